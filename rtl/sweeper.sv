// sweeper: the sweep logic of one submatrix.
//
// Two jobs run side by side.
//
// Time tagging, at every BCO edge (bco_tick): every macro pixel (MP) whose
// fast-OR is active is frozen (its freeze line goes high, so it takes no new
// hits) and, if the scan buffer has room, the map of all frozen MPs not yet
// queued is pushed with the time stamp of the period just closed. A map is
// pushed at every edge, even an empty one, so that every period gets its
// time-stamp header downstream. If the scan buffer is full, the edge is
// skipped (sb_overflow pulses): the fired MPs stay frozen and go into the
// map of the next edge that finds room, under that later time stamp.
//
// Sweep: the oldest map is copied out of the scan buffer. The sweeper first
// loads a time-stamp header into all sparsifiers, then walks the MP columns
// that hold at least one MP of the map, lowest first, skipping empty ones.
// For each such MP column it reads its pixel columns one per cycle as the
// active column (rd_valid, rd_col, mp_en = the map's MPs in that column),
// each read also loading the sparsifiers. With the read of the last pixel
// column the MPs of the map in that column are reset and unfrozen
// (mp_reset). Reads and header loads wait for sp_ready (all sparsifiers
// able to take a load). When no column is left, the next map is fetched.
//
// Timing: one pixel column per cycle when the sparsifiers keep up; one idle
// cycle between maps. mp_reset and the bus read happen in the same cycle,
// so the data are sampled by the sparsifiers before the MPs clear.
//
// Follows the document: freeze on the BCO edge of MPs with active fast-OR,
// map plus time stamp in the scan buffer, column-wise scan, reset after
// read, longer freezing when the scan buffer overflows. Own choices: the
// empty-map push, skipping of empty MP columns inferred from the mean
// sweeping times the document reports, header handling and the FSM.
module sweeper
  import superpix_pkg::*;
#(
  parameter int unsigned MPC  = 40,   // MP columns
  parameter int unsigned MPR  = 32,   // MP rows
  parameter int unsigned MP_W = 2,    // pixel columns per MP
  localparam int unsigned NMP = MPC * MPR,
  localparam int unsigned CW  = $clog2(MPC * MP_W)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    run,
  input  logic                    bco_tick,
  input  logic [TS_W-1:0]         ts,
  // macro pixels
  input  logic [MPC-1:0][MPR-1:0] fast_or,
  output logic [MPC-1:0][MPR-1:0] freeze,
  output logic [MPC-1:0][MPR-1:0] mp_reset,
  output logic                    rd_valid,
  output logic [CW-1:0]           rd_col,
  output logic [MPR-1:0]          mp_en,
  // scan buffer
  output logic                    sb_push,
  output logic [TS_W-1:0]         sb_push_ts,
  output logic [NMP-1:0]          sb_push_map,
  input  logic                    sb_full,
  output logic                    sb_pop,
  input  logic                    sb_empty,
  input  logic [TS_W-1:0]         sb_head_ts,
  input  logic [NMP-1:0]          sb_head_map,
  output logic                    sb_overflow,
  // sparsifiers
  input  logic                    sp_ready,
  output logic                    sp_load,
  output logic                    sp_load_ts,
  output logic [TS_W-1:0]         sp_ts,
  output logic                    busy
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_COL} state_t;

  state_t                    state;
  logic [MPC-1:0][MPR-1:0]   frozen, queued, work;
  logic [TS_W-1:0]           cur_ts;
  logic [$clog2(MP_W)-1:0]   sub;        // pixel column inside the MP column
  logic [$clog2(MPC)-1:0]    csel;
  logic                      have_col;
  logic                      sb_room;
  logic [MPC-1:0][MPR-1:0]   fo_eff, newmap;

  // lowest MP column still holding MPs of the current map
  always_comb begin
    csel     = '0;
    have_col = 1'b0;
    for (int c = MPC - 1; c >= 0; c--) begin
      if (|work[c]) begin
        csel     = $clog2(MPC)'(c);
        have_col = 1'b1;
      end
    end
  end

  // sweep outputs
  always_comb begin
    rd_valid   = 1'b0;
    rd_col     = CW'(csel) * CW'(MP_W) + CW'(sub);
    mp_en      = work[csel];
    mp_reset   = '0;
    sp_load    = 1'b0;
    sp_load_ts = 1'b0;
    sp_ts      = cur_ts;
    sb_pop     = 1'b0;
    case (state)
      S_IDLE: sb_pop = !sb_empty;
      S_HDR: begin
        sp_load    = sp_ready;
        sp_load_ts = 1'b1;
      end
      S_COL: if (have_col && sp_ready) begin
        rd_valid = 1'b1;
        sp_load  = 1'b1;
        if (sub == $clog2(MP_W)'(MP_W - 1)) mp_reset[csel] = work[csel];
      end
      default: ;
    endcase
  end

  // time tagging at the BCO edge
  assign sb_room     = !sb_full || sb_pop;
  assign fo_eff      = fast_or & ~mp_reset;
  assign newmap      = fo_eff & ~(queued & ~mp_reset);
  assign sb_push     = run && bco_tick && sb_room;
  assign sb_push_ts  = ts;
  assign sb_push_map = newmap;
  assign sb_overflow = run && bco_tick && !sb_room;
  assign freeze      = frozen;
  assign busy        = (state != S_IDLE) || !sb_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frozen <= '0;
      queued <= '0;
    end else begin
      if (run && bco_tick) frozen <= (frozen & ~mp_reset) | fo_eff;
      else                 frozen <= frozen & ~mp_reset;
      if (sb_push)         queued <= (queued & ~mp_reset) | newmap;
      else                 queued <= queued & ~mp_reset;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      work   <= '0;
      cur_ts <= '0;
      sub    <= '0;
    end else begin
      case (state)
        S_IDLE: if (!sb_empty) begin
          work   <= sb_head_map;
          cur_ts <= sb_head_ts;
          sub    <= '0;
          state  <= S_HDR;
        end
        S_HDR: if (sp_ready) state <= S_COL;
        S_COL: begin
          if (!have_col) state <= S_IDLE;
          else if (sp_ready) begin
            if (sub == $clog2(MP_W)'(MP_W - 1)) begin
              sub        <= '0;
              work[csel] <= '0;
            end else begin
              sub <= sub + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
