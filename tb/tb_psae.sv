// tb_psae: self-checking test of one pass-switching MQ encoder lane.
// Random pass/context/decision pairs (skewed decisions, so probability
// states move in both directions) are sent to random code streams of the
// lane, interleaved; a flush pair follows.  The bytes of every stream are
// compared with an independent MQ encoder model, as is the number of cycles
// (one pair per cycle, one flushed stream per cycle).
`timescale 1ns/1ps
module tb_psae;
  import jp2k_pkg::*;
  import tb_ref_pkg::*;
  localparam int LANE = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready;
  pcxd_t in_pair;
  logic [2:0] out_n; logic [2:0][7:0] out_byte; logic [1:0] out_blk; logic [3:0] out_plane;
  logic out_eos, done;
  int checks = 0, failures = 0;

  psae #(.LANE(LANE)) dut (.*);

  mq_ref ref_m [4][10];
  byte unsigned got [4][10][$];
  bit eos_seen [4][10];

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < int'(out_n); i++) got[out_blk][out_plane].push_back(out_byte[i]);
    if (out_eos) eos_seen[out_blk][out_plane] = 1;
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ncyc, t0;
    foreach (ref_m[b, k]) ref_m[b][k] = new();
    in_valid = 0; in_pair = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int rep = 0; rep < 2; rep++) begin
      t0 = $time;
      for (int n = 0; n < 6000; n++) begin
        int b, k, pass, cx; bit d;
        b = $urandom_range(3);
        k = 3 * $urandom_range(LANE == 0 ? 3 : 2) + LANE;
        if (rep == 1 && b == 2) b = 1;          // leave streams unused in the second block
        pass = $urandom_range(2); cx = $urandom_range(18);
        d = ($urandom_range(99) < (cx < 9 ? 15 : 60));
        in_pair = '{flush: 1'b0, blk: 2'(b), plane: 4'(k), pass: 2'(pass), cx: 5'(cx), d: d};
        in_valid = 1;
        @(posedge clk); while (!in_ready) @(posedge clk);
        ref_m[b][k].encode(pass, cx, d);
      end
      ncyc = ($time - t0) / 10;
      checks++; if (ncyc != 6000) begin failures++; $display("rate: %0d cycles for 6000 pairs", ncyc); end
      in_pair = '0; in_pair.flush = 1; in_valid = 1;
      @(posedge clk); in_valid = 0;
      t0 = $time;
      while (!done) @(posedge clk);
      ncyc = ($time - t0) / 10;
      checks++; if (ncyc != NBLK * NGRP) begin failures++; $display("flush took %0d cycles", ncyc); end
      @(posedge clk);
      foreach (ref_m[b, k]) begin
        byte unsigned exp_q[$];
        if (k % 3 != LANE) continue;
        if (ref_m[b][k].used) ref_m[b][k].flush(exp_q); else exp_q = {};
        checks++;
        if (exp_q != got[b][k] || eos_seen[b][k] != ref_m[b][k].used) begin
          failures++;
          $display("stream b%0d k%0d: %0d bytes expected, %0d got", b, k, exp_q.size(), got[b][k].size());
        end
        got[b][k] = {}; eos_seen[b][k] = 0; ref_m[b][k].reset();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
