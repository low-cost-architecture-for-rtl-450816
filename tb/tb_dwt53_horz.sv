// tb_dwt53_horz: eight random rows of random even length stream through the
// horizontal 5/3 stage with a randomly stalling consumer; the four sub-band
// outputs are compared with a reference row lifting, and one output must
// appear per two input columns.
`timescale 1ns/1ps
module tb_dwt53_horz;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, first, last, out_valid, out_ready;
  logic signed [7:0][15:0] y;
  logic signed [3:0][15:0] ll, hl, lh, hh;
  int checks = 0, failures = 0;
  int exp_q[$];
  int nout;

  dwt53_horz #(.DW(16)) dut (.*);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    nout++;
    for (int r = 0; r < 4; r++) begin
      checks += 4;
      if (exp_q.size() < 4) begin failures += 4; continue; end
      if (int'($signed(ll[r])) != exp_q[0]) begin failures++; if (failures < 4) $display("r%0d ll %0d exp %0d hl %0d exp %0d", r, $signed(ll[r]), exp_q[0], $signed(hl[r]), exp_q[1]); end
      if (int'($signed(hl[r])) != exp_q[1]) failures++;
      if (int'($signed(lh[r])) != exp_q[2]) failures++;
      if (int'($signed(hh[r])) != exp_q[3]) failures++;
      repeat (4) void'(exp_q.pop_front());
    end
  end

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    en = 0; first = 0; last = 0; y = '0; out_ready = 0; nout = 0;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int t = 0; t < 30; t++) begin
      int w;
      int rows[8][];
      int lo[8][], hi[8][];
      w = 2 * $urandom_range(1, 20);
      foreach (rows[r]) begin
        rows[r] = new[w];
        foreach (rows[r][c]) rows[r][c] = $urandom_range(600) - 300;
        lift53(rows[r], lo[r], hi[r]);
      end
      nout = 0;
      for (int c = 0; c < w / 2; c++)
        for (int r = 0; r < 4; r++) begin
          exp_q.push_back(lo[r][c]); exp_q.push_back(hi[r][c]);
          exp_q.push_back(lo[r+4][c]); exp_q.push_back(hi[r+4][c]);
        end
      for (int c = 0; c < w; c++) begin
        @(negedge clk);
        out_ready = 1'($urandom_range(1));
        // only accept a column when the output register is free or read
        while (dut.out_valid && !out_ready) begin @(negedge clk); out_ready = 1'($urandom_range(1)); end
        for (int r = 0; r < 8; r++) y[r] = 16'(rows[r][c]);
        first = (c == 0); last = (c == w - 1); en = 1;
        @(posedge clk);
        @(negedge clk); en = 0;
      end
      out_ready = 1;
      repeat (3) @(posedge clk);
      checks++; if (nout != w / 2) begin failures++; $display("w=%0d: %0d outputs", w, nout); end
    end
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
