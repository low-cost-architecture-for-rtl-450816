// tb_tscf: exhaustive-random test of the two-sample context formation.
// Random context windows of every sub-band are applied; the passes, contexts
// and decisions are compared with a table-driven reference (JPEG2000 zero
// coding, sign coding and refinement tables).
`timescale 1ns/1ps
module tb_tscf;
  import jp2k_pkg::*;
  logic in_valid;
  cw_t in_cw;
  logic [3:0] out_valid;
  pcxd_t [3:0] out_pair;
  int checks = 0, failures = 0;

  tscf dut (.*);

  // reference zero-coding table: zc_tab[sb][h][v][d]
  function automatic int zc_ref(int sb, int h, int v, int d);
    int s;
    if (sb == 3) begin
      s = h + v;
      case (d)
        0: return (s == 0) ? 0 : (s == 1) ? 1 : 2;
        1: return (s == 0) ? 3 : (s == 1) ? 4 : 5;
        2: return (s == 0) ? 6 : 7;
        default: return 8;
      endcase
    end
    if (sb == 1) begin s = h; h = v; v = s; end
    case (h)
      2: return 8;
      1: return (v > 0) ? 7 : (d > 0) ? 6 : 5;
      default: return (v == 2) ? 4 : (v == 1) ? 3 : (d >= 2) ? 2 : (d == 1) ? 1 : 0;
    endcase
  endfunction

  function automatic int dec(logic [1:0] c);
    return (c == 2'b01) ? 1 : (c == 2'b11) ? -1 : 0;
  endfunction

  initial begin
    int sctab [3][3] = '{'{11, 12, 13}, '{10, 9, 10}, '{13, 12, 11}};   // [1-hc][vc+1]
    in_valid = 0; in_cw = '0;
    #1;
    checks++; if (out_valid != 0) failures++;
    for (int n = 0; n < 20000; n++) begin
      int nexp;
      pcxd_t exp_q[$];
      exp_q = {};
      in_cw = '0;
      in_cw.blk = 2'($urandom_range(3));
      in_cw.plane = 4'($urandom_range(9));
      for (int s = 0; s < 2; s++) begin
        cw_smp_t x;
        x.vp = 1'($urandom); x.sig = 1'($urandom); x.refd = x.sig & 1'($urandom); x.sign = 1'($urandom);
        x.nh = 2'($urandom_range(2)); x.nv = 2'($urandom_range(2)); x.nd = 3'($urandom_range(4));
        if ($urandom_range(3) == 0) begin x.nh = 0; x.nv = 0; x.nd = 0; end
        x.hc = (x.nh == 0) ? 2'b00 : 2'($urandom_range(2) == 2 ? 3 : $urandom_range(1));
        x.vc = (x.nv == 0) ? 2'b00 : 2'($urandom_range(2) == 2 ? 3 : $urandom_range(1));
        if (s == 0) in_cw.s0 = x; else in_cw.s1 = x;
        begin
          pcxd_t p;
          int hc, vc, nb;
          p = '0; p.blk = in_cw.blk; p.plane = in_cw.plane; p.d = x.vp;
          nb = int'(x.nh) + int'(x.nv) + int'(x.nd);
          if (x.sig) begin
            p.pass = 2'd1; p.cx = x.refd ? 5'd16 : (nb > 0) ? 5'd15 : 5'd14;
            exp_q.push_back(p);
          end else begin
            p.pass = (nb > 0) ? 2'd0 : 2'd2;
            p.cx = 5'(zc_ref(int'(in_cw.blk), int'(x.nh), int'(x.nv), int'(x.nd)));
            exp_q.push_back(p);
            if (x.vp) begin
              hc = dec(x.hc); vc = dec(x.vc);
              p.cx = 5'(sctab[1 - hc][vc + 1]);
              p.d = x.sign ^ ((hc < 0) || (hc == 0 && vc < 0));
              exp_q.push_back(p);
            end
          end
        end
      end
      in_valid = 1;
      #1;
      nexp = 0;
      for (int i = 0; i < 4; i++) if (out_valid[i]) begin
        checks++;
        if (nexp >= exp_q.size() || out_pair[i] != exp_q[nexp]) begin
          failures++;
          if (failures < 10) $display("mismatch slot %0d: got %p", i, out_pair[i]);
        end
        nexp++;
      end
      checks++; if (nexp != exp_q.size()) failures++;
    end
    // flush marker
    in_cw = '0; in_cw.flush = 1; #1;
    checks++; if (out_valid != 4'b0001 || !out_pair[0].flush) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
