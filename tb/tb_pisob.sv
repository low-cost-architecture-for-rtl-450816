// tb_pisob: random groups of 1..4 pairs (random slot masks) enter the
// parallel-in serial-out buffer against a randomly stalling consumer; the
// serial output must be the valid slots in slot order, group after group,
// and a stream of full groups with a ready consumer must move at one pair
// per cycle.
`timescale 1ns/1ps
module tb_pisob;
  import jp2k_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [3:0] in_mask;
  pcxd_t [3:0] in_pair;
  pcxd_t out_pair;
  int checks = 0, failures = 0;
  pcxd_t exp_q[$];
  bit stall_en = 1;
  int nout = 0;

  pisob dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++; nout++;
      if (exp_q.size() == 0 || out_pair != exp_q.pop_front()) failures++;
    end
    out_ready <= stall_en ? 1'($urandom_range(2) != 0) : 1'b1;
  end

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int t0;
    in_valid = 0; in_mask = 0; in_pair = '0; out_ready = 0;
    repeat (3) @(posedge clk); rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_mask = 4'($urandom_range(15));
      if (in_mask == 0) in_mask = 4'b1000;
      for (int i = 0; i < 4; i++) in_pair[i] = pcxd_t'($urandom);
      for (int i = 0; i < 4; i++) if (in_mask[i]) exp_q.push_back(in_pair[i]);
      in_valid = 1;
      @(posedge clk); while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    repeat (50) @(posedge clk);
    checks++; if (exp_q.size() != 0) failures++;
    // throughput: 100 full groups, consumer always ready
    stall_en = 0;
    repeat (3) @(posedge clk);
    nout = 0;
    t0 = $time;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      in_mask = 4'hF;
      for (int i = 0; i < 4; i++) begin in_pair[i] = pcxd_t'($urandom); exp_q.push_back(in_pair[i]); end
      in_valid = 1;
      @(posedge clk); while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    while (nout < 400) @(posedge clk);
    checks++;
    if (($time - t0) / 10 > 402) begin failures++; $display("400 pairs took %0d cycles", ($time - t0) / 10); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
