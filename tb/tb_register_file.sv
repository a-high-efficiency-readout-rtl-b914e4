// tb_register_file: drives random event pulses and register accesses and
// compares the read-only counters, flags and CTRL with a model; checks the
// counter clear, saturation of the 8-bit error counters and routing of the
// mask window to the mask-register port.
module tb_register_file;
  localparam int NSUB = 4;
  logic clk = 0, rst_n = 0;
  logic [15:0] addr;
  logic wr_en, run, mask_wr, hit_word, ts_word;
  logic [7:0] wdata, rdata, mask_rdata;
  logic [9:0] mask_addr;
  logic [NSUB-1:0] sb_full, busy, sb_overflow, b2_overflow, b1_overflow;
  int checks = 0, failures = 0;
  longint hits = 0, tsw = 0;
  int sbc[NSUB], b2c[NSUB], b1c[NSUB];
  bit m_run = 1, clr_pending = 0;
  int n_sat = 0, n_clr = 0;

  register_file dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] expect_rd(input logic [15:0] a);
    if (a >= 16'h0100 && a < 16'h0100 + 1024) return mask_rdata;
    case (a)
      16'h0000: return {7'b0, m_run};
      16'h0002: return {busy, sb_full};
      16'h0004: return hits[7:0];
      16'h0005: return hits[15:8];
      16'h0006: return hits[23:16];
      16'h0007: return hits[31:24];
      16'h0008: return tsw[7:0];
      16'h0009: return tsw[15:8];
      16'h000A: return tsw[23:16];
      16'h000B: return tsw[31:24];
      default: ;
    endcase
    for (int s = 0; s < NSUB; s++) begin
      if (a == 16'h0010 + 16'(s)) return 8'(sbc[s]);
      if (a == 16'h0014 + 16'(s)) return 8'(b2c[s]);
      if (a == 16'h0018 + 16'(s)) return 8'(b1c[s]);
    end
    return 8'h00;
  endfunction

  initial begin
    addr = '0; wr_en = 0; wdata = '0; mask_rdata = '0; hit_word = 0; ts_word = 0;
    sb_full = '0; busy = '0; sb_overflow = '0; b2_overflow = '0; b1_overflow = '0;
    for (int s = 0; s < NSUB; s++) begin sbc[s] = 0; b2c[s] = 0; b1c[s] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      checks++;
      if (rdata !== expect_rd(addr)) begin failures++; $display("addr %h read %h expected %h", addr, rdata, expect_rd(addr)); end
      checks++;
      if (run !== m_run) begin failures++; $display("run mismatch"); end
      checks++;
      if (mask_wr !== (wr_en && addr >= 16'h0100 && addr < 16'h0500) || (mask_wr && mask_addr !== 10'(addr - 16'h0100))) begin
        failures++; $display("mask port mismatch");
      end
      // stimulus
      mask_rdata  = 8'($urandom);
      sb_full     = 4'($urandom); busy = 4'($urandom);
      hit_word    = $urandom_range(0, 1); ts_word = ($urandom_range(0, 3) == 0);
      sb_overflow = 4'($urandom); b2_overflow = 4'($urandom); b1_overflow = 4'($urandom);
      case ($urandom_range(0, 9))
        0: addr = 16'($urandom_range(16'h0100, 16'h0520));
        1: addr = 16'h0000;
        default: addr = 16'($urandom_range(0, 16'h001F));
      endcase
      wr_en = (addr == 16'h0000) ? ($urandom_range(0, 40) == 0) : ($urandom_range(0, 3) == 0);
      wdata = (addr == 16'h0000) ? {6'b0, 1'($urandom_range(0, 1)), 1'($urandom_range(0, 7) != 0)} : 8'($urandom);
      // model: counters count this cycle's pulses unless a clear is taking effect
      if (clr_pending) begin
        hits = 0; tsw = 0; n_clr++;
        for (int s = 0; s < NSUB; s++) begin sbc[s] = 0; b2c[s] = 0; b1c[s] = 0; end
      end else begin
        hits += hit_word; tsw += ts_word;
        for (int s = 0; s < NSUB; s++) begin
          if (sb_overflow[s] && sbc[s] < 255) sbc[s]++;
          if (b2_overflow[s] && b2c[s] < 255) b2c[s]++;
          if (b1_overflow[s] && b1c[s] < 255) b1c[s]++;
          if (b1c[s] == 255) n_sat++;
        end
      end
      clr_pending = wr_en && addr == 16'h0000 && wdata[1];
      if (wr_en && addr == 16'h0000) m_run = wdata[0];
    end
    checks++;
    if (n_clr == 0 || n_sat == 0) begin failures++; $display("clear %0d saturation %0d", n_clr, n_sat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
