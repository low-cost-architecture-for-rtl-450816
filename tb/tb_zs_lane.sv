// tb_zs_lane: packages with random presence/significance flags enter one
// zero-skipping lane; the consumer stalls at random.  Out must come exactly
// the significant CWs in order, every insignificant CW must be reported as
// skipped, and the lane must refuse input only when its queue is full.
`timescale 1ns/1ps
module tb_zs_lane;
  import jp2k_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_present, in_sig, out_valid, out_ready, skip_valid;
  cw_t in_cw, out_cw;
  logic [1:0] skip_blk; logic [3:0] skip_plane;
  int checks = 0, failures = 0, nskip = 0, exp_skip = 0, full_seen = 0;
  cw_t exp_q[$];

  zs_lane #(.DEPTH(4)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_cw != exp_q.pop_front()) failures++;
    end
    if (skip_valid) begin
      nskip++;
      checks++; if (skip_blk != in_cw.blk || skip_plane != in_cw.plane) failures++;
    end
    if (!in_ready) full_seen++;
    out_ready <= 1'($urandom_range(3) == 0);
  end

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    in_valid = 0; in_present = 0; in_sig = 0; in_cw = '0; out_ready = 0;
    repeat (3) @(posedge clk); rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      while (!in_ready) begin in_valid = 0; @(posedge clk); @(negedge clk); end
      in_cw = cw_t'({$urandom, $urandom, $urandom});
      in_cw.flush = 0;
      in_present = 1'($urandom_range(5) != 0);
      in_sig = 1'($urandom_range(1));
      if (in_present && in_sig) exp_q.push_back(in_cw);
      if (in_present && !in_sig) exp_skip++;
      in_valid = 1;
      @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    repeat (200) @(posedge clk);
    checks++; if (exp_q.size() != 0) failures++;
    checks++; if (nskip != exp_skip) failures++;
    checks++; if (full_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
