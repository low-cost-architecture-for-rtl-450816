// jp2k_pkg: shared sizes, record types and the MQ-coder arithmetic used by the
// word-level JPEG2000 encoder (code-block based 5/3 DWT, CS-AEBC entropy coder,
// dynamic RDO).
//
// The sizes follow the encoder as specified: 8-pixel DWT columns, 4-row EBC
// stripes, 10 magnitude bit-planes plus sign, four sub-band code-blocks coded
// together, three coding lanes (one per parallel context-formation circuit),
// 19 contexts per coding pass.  The record types are this design's own: a
// "context window" (cw_t) carries two vertically adjacent samples of one
// bit-plane together with the neighbourhood counts that the context formation
// needs, and a pcxd_t is one pass/context/decision triple.
//
// The MQ probability table (index -> Qe, NMPS, NLPS, SWITCH) is the standard
// 47-entry table of the JPEG2000 arithmetic coder.  mq_encode() and mq_flush()
// perform one symbol encoding (including the renormalisation and byte-out steps)
// or the terminating flush, in one combinational step, returning up to three
// released code bytes.
package jp2k_pkg;

  // ---------------- sizes ----------------
  localparam int unsigned NBP     = 10;  // magnitude bit-planes of a coefficient
  localparam int unsigned MAGW    = 10;  // coefficient magnitude width
  localparam int unsigned NBLK    = 4;   // code-blocks coded concurrently (LL/HL/LH/HH)
  localparam int unsigned NLANE   = 3;   // PCF/PSAE lanes
  localparam int unsigned NGRP    = (NBP + NLANE - 1) / NLANE;  // plane groups (packages per half)
  localparam int unsigned NCTX    = 19;  // contexts per coding pass
  localparam int unsigned NPASS   = 3;   // SPP, MRP, CUP
  localparam int unsigned STRIPE  = 4;   // EBC stripe height (samples)

  // sub-band codes
  typedef enum logic [1:0] {SB_LL = 2'd0, SB_HL = 2'd1, SB_LH = 2'd2, SB_HH = 2'd3} subband_e;

  // coding passes
  typedef enum logic [1:0] {P_SPP = 2'd0, P_MRP = 2'd1, P_CUP = 2'd2} pass_e;

  // sign-magnitude coefficient
  typedef struct packed {
    logic            sign;   // 1 = negative
    logic [MAGW-1:0] mag;
  } coef_t;

  // one sample of a context window, at one bit-plane
  typedef struct packed {
    logic       vp;     // magnitude bit at this plane
    logic       sig;    // significant before this plane (sigma[k])
    logic       refd;   // significant before plane k+1 (gamma[k]); refined before
    logic       sign;   // sign of the coefficient
    logic [1:0] nh;     // significant horizontal neighbours (0..2)
    logic [1:0] nv;     // significant vertical neighbours (0..2)
    logic [2:0] nd;     // significant diagonal neighbours (0..4)
    logic [1:0] hc;     // horizontal sign contribution: 01 = +1, 11 = -1, 00 = 0
    logic [1:0] vc;     // vertical sign contribution
  } cw_smp_t;

  // context window: two samples of one column half, one plane, one code-block
  typedef struct packed {
    logic       flush;  // end-of-code-block marker (no samples)
    logic [1:0] blk;    // code-block / sub-band
    logic [3:0] plane;  // bit-plane k
    cw_smp_t    s1;     // lower sample (row 2*half+1)
    cw_smp_t    s0;     // upper sample (row 2*half)
  } cw_t;

  // pass / context / decision
  typedef struct packed {
    logic       flush;
    logic [1:0] blk;
    logic [3:0] plane;
    logic [1:0] pass;
    logic [4:0] cx;
    logic       d;
  } pcxd_t;

  // ---------------- MQ coder ----------------
  typedef struct packed {
    logic [15:0] qe;
    logic [5:0]  nmps;
    logic [5:0]  nlps;
    logic        sw;
  } mq_row_t;

  function automatic mq_row_t mq_table(input logic [5:0] i);
    case (i)
      6'd0:  return '{16'h5601, 6'd1,  6'd1,  1'b1};
      6'd1:  return '{16'h3401, 6'd2,  6'd6,  1'b0};
      6'd2:  return '{16'h1801, 6'd3,  6'd9,  1'b0};
      6'd3:  return '{16'h0AC1, 6'd4,  6'd12, 1'b0};
      6'd4:  return '{16'h0521, 6'd5,  6'd29, 1'b0};
      6'd5:  return '{16'h0221, 6'd38, 6'd33, 1'b0};
      6'd6:  return '{16'h5601, 6'd7,  6'd6,  1'b1};
      6'd7:  return '{16'h5401, 6'd8,  6'd14, 1'b0};
      6'd8:  return '{16'h4801, 6'd9,  6'd14, 1'b0};
      6'd9:  return '{16'h3801, 6'd10, 6'd14, 1'b0};
      6'd10: return '{16'h3001, 6'd11, 6'd17, 1'b0};
      6'd11: return '{16'h2401, 6'd12, 6'd18, 1'b0};
      6'd12: return '{16'h1C01, 6'd13, 6'd20, 1'b0};
      6'd13: return '{16'h1601, 6'd29, 6'd21, 1'b0};
      6'd14: return '{16'h5601, 6'd15, 6'd14, 1'b1};
      6'd15: return '{16'h5401, 6'd16, 6'd14, 1'b0};
      6'd16: return '{16'h5101, 6'd17, 6'd15, 1'b0};
      6'd17: return '{16'h4801, 6'd18, 6'd16, 1'b0};
      6'd18: return '{16'h3801, 6'd19, 6'd17, 1'b0};
      6'd19: return '{16'h3401, 6'd20, 6'd18, 1'b0};
      6'd20: return '{16'h3001, 6'd21, 6'd19, 1'b0};
      6'd21: return '{16'h2801, 6'd22, 6'd19, 1'b0};
      6'd22: return '{16'h2401, 6'd23, 6'd20, 1'b0};
      6'd23: return '{16'h2201, 6'd24, 6'd21, 1'b0};
      6'd24: return '{16'h1C01, 6'd25, 6'd22, 1'b0};
      6'd25: return '{16'h1801, 6'd26, 6'd23, 1'b0};
      6'd26: return '{16'h1601, 6'd27, 6'd24, 1'b0};
      6'd27: return '{16'h1401, 6'd28, 6'd25, 1'b0};
      6'd28: return '{16'h1201, 6'd29, 6'd26, 1'b0};
      6'd29: return '{16'h1101, 6'd30, 6'd27, 1'b0};
      6'd30: return '{16'h0AC1, 6'd31, 6'd28, 1'b0};
      6'd31: return '{16'h09C1, 6'd32, 6'd29, 1'b0};
      6'd32: return '{16'h08A1, 6'd33, 6'd30, 1'b0};
      6'd33: return '{16'h0521, 6'd34, 6'd31, 1'b0};
      6'd34: return '{16'h0441, 6'd35, 6'd32, 1'b0};
      6'd35: return '{16'h02A1, 6'd36, 6'd33, 1'b0};
      6'd36: return '{16'h0221, 6'd37, 6'd34, 1'b0};
      6'd37: return '{16'h0141, 6'd38, 6'd35, 1'b0};
      6'd38: return '{16'h0111, 6'd39, 6'd36, 1'b0};
      6'd39: return '{16'h0085, 6'd40, 6'd37, 1'b0};
      6'd40: return '{16'h0049, 6'd41, 6'd38, 1'b0};
      6'd41: return '{16'h0025, 6'd42, 6'd39, 1'b0};
      6'd42: return '{16'h0015, 6'd43, 6'd40, 1'b0};
      6'd43: return '{16'h0009, 6'd44, 6'd41, 1'b0};
      6'd44: return '{16'h0005, 6'd45, 6'd42, 1'b0};
      6'd45: return '{16'h0001, 6'd45, 6'd43, 1'b0};
      default: return '{16'h5601, 6'd46, 6'd46, 1'b0};
    endcase
  endfunction

  // initial probability state of a context (index and MPS)
  function automatic logic [5:0] mq_init_index(input logic [4:0] cx);
    case (cx)
      5'd0:    return 6'd4;   // all-zero-neighbourhood zero coding
      5'd17:   return 6'd3;   // run-length
      5'd18:   return 6'd46;  // uniform
      default: return 6'd0;
    endcase
  endfunction

  // coder registers of one code stream
  typedef struct packed {
    logic [15:0] a;
    logic [27:0] c;
    logic [3:0]  ct;
    logic [7:0]  b;
    logic        started;  // the byte in b is a real code byte (not the pre-start byte)
  } mq_reg_t;

  localparam mq_reg_t MQ_RESET = '{a: 16'h8000, c: 28'd0, ct: 4'd12, b: 8'd0, started: 1'b0};

  // up to three bytes released by one step
  typedef struct packed {
    logic [2:0]      n;
    logic [2:0][7:0] byt;   // byt[0] released first
  } mq_out_t;

  // coder registers, context state and released bytes after one step
  typedef struct packed {
    mq_reg_t    r;
    logic [5:0] idx;
    logic       mps;
    mq_out_t    o;
  } mq_step_t;

  // BYTEOUT procedure: may release the byte held in b
  function automatic mq_step_t mq_byteout(input mq_step_t st);
    logic [7:0] old_b;
    old_b = st.r.b;
    if (st.r.b == 8'hFF) begin
      st.r.b  = st.r.c[27:20];
      st.r.c  = {8'd0, st.r.c[19:0]};
      st.r.ct = 4'd7;
    end else if (st.r.c[27] == 1'b0) begin
      st.r.b  = st.r.c[26:19];
      st.r.c  = {9'd0, st.r.c[18:0]};
      st.r.ct = 4'd8;
    end else begin
      // carry into the held byte
      old_b = st.r.b + 8'd1;
      if (old_b == 8'hFF) begin
        st.r.c  = {1'b0, st.r.c[26:0]};
        st.r.b  = st.r.c[27:20];
        st.r.c  = {8'd0, st.r.c[19:0]};
        st.r.ct = 4'd7;
      end else begin
        st.r.b  = st.r.c[26:19];
        st.r.c  = {9'd0, st.r.c[18:0]};
        st.r.ct = 4'd8;
      end
    end
    if (st.r.started) begin
      st.o.byt[st.o.n[1:0]] = old_b;
      st.o.n = st.o.n + 3'd1;
    end
    st.r.started = 1'b1;
    return st;
  endfunction

  // encode decision d with context state (idx, mps) of the coder in r
  function automatic mq_step_t mq_encode(input mq_reg_t r, input logic [5:0] idx,
                                         input logic mps, input logic d);
    mq_row_t  row;
    logic [15:0] qe;
    mq_step_t st;
    logic     renorm;
    row    = mq_table(idx);
    qe     = row.qe;
    st.r   = r;
    st.idx = idx;
    st.mps = mps;
    st.o   = '0;
    renorm = 1'b1;
    st.r.a = st.r.a - qe;
    if (d == mps) begin
      if (st.r.a[15] == 1'b0) begin
        if (st.r.a < qe) st.r.a = qe;
        else             st.r.c = st.r.c + 28'(qe);
        st.idx = row.nmps;
      end else begin
        st.r.c = st.r.c + 28'(qe);
        renorm = 1'b0;        // A still normalised
      end
    end else begin
      if (st.r.a < qe) st.r.c = st.r.c + 28'(qe);
      else             st.r.a = qe;
      if (row.sw) st.mps = ~mps;
      st.idx = row.nlps;
    end
    // RENORME: at most 15 shifts
    if (renorm)
      for (int i = 0; i < 16; i++) begin
        if (st.r.a[15] == 1'b0) begin
          st.r.a  = st.r.a << 1;
          st.r.c  = st.r.c << 1;
          st.r.ct = st.r.ct - 4'd1;
          if (st.r.ct == 4'd0) st = mq_byteout(st);
        end
      end
    return st;
  endfunction

  // FLUSH procedure: terminates the code stream and releases the remaining bytes
  function automatic mq_step_t mq_flush(input mq_reg_t r);
    logic [27:0] tempc;
    mq_step_t st;
    st     = '0;
    st.r   = r;
    tempc  = st.r.c + 28'(st.r.a);
    st.r.c = st.r.c | 28'hFFFF;
    if (st.r.c >= tempc) st.r.c = st.r.c - 28'h8000;
    st.r.c = st.r.c << st.r.ct;
    st = mq_byteout(st);
    st.r.c = st.r.c << st.r.ct;
    st = mq_byteout(st);
    if (st.r.b != 8'hFF && st.r.started) begin
      st.o.byt[st.o.n[1:0]] = st.r.b;
      st.o.n = st.o.n + 3'd1;
    end
    return st;
  endfunction

  // two's-complement DWT output -> sign-magnitude coefficient, magnitude
  // saturated to MAGW bits (unit quantisation step)
  function automatic coef_t to_coef(input logic signed [15:0] v);
    logic [15:0] m;
    coef_t r;
    m = v[15] ? 16'(-v) : 16'(v);
    r.sign = v[15];
    r.mag  = (m > 16'((1 << MAGW) - 1)) ? MAGW'((1 << MAGW) - 1) : m[MAGW-1:0];
    return r;
  endfunction

endpackage
