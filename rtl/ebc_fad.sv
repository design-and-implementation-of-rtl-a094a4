// ebc_fad: four-symbol arithmetic decoder (FAD) of one bit-plane.
//
// The decoder serves the context formation (CF) of its bit-plane. In the
// parallel mode every coding pass is terminated and restarts its probability
// models, so the three passes of a bit-plane are three independent MQ code
// streams. The FAD keeps, for each pass, its own MQ decoder registers (A, C,
// CT), its own nineteen context states and a byte window of WIN bytes that is
// filled from that pass's byte input, one byte per cycle.
//
// One request decodes one sample, i.e. up to four symbols in one cycle:
//   REQ_ZCSC : magnitude bit (zero-coding context), then sign if the bit is 1
//   REQ_MR   : refinement bit
//   REQ_RUN  : run-length symbol; if 1, two uniform symbols (position of the
//              first one, most significant first) and the sign of that sample
// The symbols are decoded by a chain of MQ decoding steps (ISO/IEC 15444-1
// Annex C: DECODE, RENORMD, BYTEIN) in one combinational path. The response
// comes in the same cycle; ack is low (the CF stalls) only if the chain would
// read past the bytes present in the window, or the stream is not yet
// initialised. Bytes past the end of a pass must be supplied as 0xFF by the
// byte source, as the standard's decoder assumes.
//
// start clears the windows and context states; each stream runs INITDEC once
// its window is full. The MQ decoding procedure is that of the standard; the
// window, the stall rule and the interface are this design's choices.
module ebc_fad
  import ebc_pkg::*;
#(
  parameter int WIN = 12
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  fad_req_t       req,
  output fad_rsp_t       rsp,
  input  logic [2:0][7:0] byte_in,     // per pass (index 0 = pass 1)
  input  logic [2:0]      byte_valid,
  output logic [2:0]      byte_ready
);
  localparam int PW = $clog2(2 * WIN + 2);

  typedef struct packed {
    logic [15:0]   a;
    logic [31:0]   c;
    logic [3:0]    ct;
    logic [PW-1:0] pos;     // window index of byte B
    logic [PW-1:0] top;     // highest window index read
  } mq_t;

  typedef logic [WIN-1:0][7:0] win_t;

  win_t             win   [3];
  logic [PW-1:0]    cnt   [3];
  logic [2:0]       init_done;
  mq_t              mq    [3];
  logic [5:0]       cx_i  [3][NCTX];
  logic             cx_m  [3][NCTX];

  function automatic logic [7:0] wbyte(input win_t w, input logic [PW-1:0] i);
    return (i < PW'(WIN)) ? w[i] : 8'hFF;
  endfunction

  function automatic mq_t bytein(input mq_t s, input win_t w);
    mq_t        o;
    logic [7:0] b, b1;
    o  = s;
    b  = wbyte(w, s.pos);
    b1 = wbyte(w, s.pos + PW'(1));
    if (s.pos + PW'(1) > o.top) o.top = s.pos + PW'(1);
    if (b == 8'hFF) begin
      if (b1 > 8'h8F) begin
        o.c  = s.c + 32'h0000_FF00;
        o.ct = 4'd8;
      end else begin
        o.pos = s.pos + PW'(1);
        o.c   = s.c + {15'd0, b1, 9'd0};
        o.ct  = 4'd7;
      end
    end else begin
      o.pos = s.pos + PW'(1);
      o.c   = s.c + {16'd0, b1, 8'd0};
      o.ct  = 4'd8;
    end
    return o;
  endfunction

  // One DECODE step: returns the new decoder registers, the bit, and the new
  // context state {mps, index}.
  typedef struct packed {
    mq_t        s;
    logic       bit_o;
    logic [5:0] i;
    logic       mps;
  } step_t;

  function automatic step_t mq_decode(input mq_t s, input logic [5:0] i, input logic mps,
                                      input win_t w);
    step_t       o;
    logic [15:0] qe;
    logic        renorm;
    o.s   = s;
    o.i   = i;
    o.mps = mps;
    qe    = mq_qe(i);
    o.s.a = s.a - qe;
    renorm = 1'b1;
    if (s.c[31:16] < qe) begin
      if (o.s.a < qe) begin                       // LPS_EXCHANGE
        o.s.a   = qe;
        o.bit_o = mps;
        o.i     = mq_nmps(i);
      end else begin
        o.s.a   = qe;
        o.bit_o = ~mps;
        if (mq_switch(i)) o.mps = ~mps;
        o.i = mq_nlps(i);
      end
    end else begin
      o.s.c[31:16] = s.c[31:16] - qe;
      if (o.s.a[15]) begin
        o.bit_o = mps;
        renorm  = 1'b0;
      end else if (o.s.a < qe) begin            // MPS_EXCHANGE
        o.bit_o = ~mps;
        if (mq_switch(i)) o.mps = ~mps;
        o.i = mq_nlps(i);
      end else begin
        o.bit_o = mps;
        o.i     = mq_nmps(i);
      end
    end
    if (renorm) begin                             // RENORMD
      for (int k = 0; k < 16; k++) begin
        if (!o.s.a[15]) begin
          if (o.s.ct == 4'd0) o.s = bytein(o.s, w);
          o.s.a  = o.s.a << 1;
          o.s.c  = o.s.c << 1;
          o.s.ct = o.s.ct - 4'd1;
        end
      end
    end
    return o;
  endfunction

  // ---------------------------------------------------------------- decode
  logic [1:0]  ps;                 // pass stream index
  mq_t         s0;
  step_t       st1;
  logic [5:0]  li [NCTX];
  logic        lm [NCTX];
  logic        b_mag, b_sign, b_rlc;
  logic [1:0]  b_uni;
  logic        b_sv;
  logic [1:0]  sc_row;
  logic        fits;
  logic [PW-1:0] consumed [3];

  always_comb begin
    ps = (req.pass == 2'd1) ? 2'd0 : (req.pass == 2'd2) ? 2'd1 : 2'd2;
    s0 = mq[ps];
    s0.top = '0;
    for (int x = 0; x < NCTX; x++) begin
      li[x] = cx_i[ps][x];
      lm[x] = cx_m[ps][x];
    end
    b_mag  = 1'b0;
    b_sign = 1'b0;
    b_rlc  = 1'b0;
    b_uni  = 2'd0;
    b_sv   = 1'b0;
    sc_row = req.row;
    st1    = '0;

    case (req.kind)
      REQ_MR: begin
        st1 = mq_decode(s0, li[req.mr_ctx], lm[req.mr_ctx], win[ps]);
        li[req.mr_ctx] = st1.i; lm[req.mr_ctx] = st1.mps; s0 = st1.s;
        b_mag = st1.bit_o;
      end
      REQ_RUN: begin
        st1 = mq_decode(s0, li[CX_RUN], lm[CX_RUN], win[ps]);
        li[CX_RUN] = st1.i; lm[CX_RUN] = st1.mps; s0 = st1.s;
        b_rlc = st1.bit_o;
        if (b_rlc) begin
          st1 = mq_decode(s0, li[CX_UNI], lm[CX_UNI], win[ps]);
          li[CX_UNI] = st1.i; lm[CX_UNI] = st1.mps; s0 = st1.s;
          b_uni[1] = st1.bit_o;
          st1 = mq_decode(s0, li[CX_UNI], lm[CX_UNI], win[ps]);
          li[CX_UNI] = st1.i; lm[CX_UNI] = st1.mps; s0 = st1.s;
          b_uni[0] = st1.bit_o;
          b_mag  = 1'b1;
          sc_row = b_uni;
        end
      end
      default: begin // REQ_ZCSC
        st1 = mq_decode(s0, li[req.zc_ctx], lm[req.zc_ctx], win[ps]);
        li[req.zc_ctx] = st1.i; lm[req.zc_ctx] = st1.mps; s0 = st1.s;
        b_mag = st1.bit_o;
      end
    endcase
    if (req.kind != REQ_MR && b_mag) begin
      st1 = mq_decode(s0, li[req.sc_ctx[sc_row]], lm[req.sc_ctx[sc_row]], win[ps]);
      li[req.sc_ctx[sc_row]] = st1.i; lm[req.sc_ctx[sc_row]] = st1.mps; s0 = st1.s;
      b_sign = st1.bit_o ^ req.sc_xor[sc_row];
      b_sv   = 1'b1;
    end

    fits = init_done[ps] && (s0.top < cnt[ps]);

    rsp.ack        = req.valid && fits;
    rsp.mag        = b_mag;
    rsp.sign       = b_sign;
    rsp.sign_valid = b_sv;
    rsp.rlc        = b_rlc;
    rsp.uniform    = b_uni;

    for (int q = 0; q < 3; q++) consumed[q] = '0;
    if (rsp.ack) consumed[ps] = s0.pos;
  end

  // INITDEC of each stream once its window is full.
  mq_t init_s [3];
  always_comb begin
    for (int q = 0; q < 3; q++) begin
      init_s[q]     = '0;
      init_s[q].c   = {8'd0, win[q][0], 16'd0};
      init_s[q]     = bytein(init_s[q], win[q]);
      init_s[q].c   = init_s[q].c << 7;
      init_s[q].ct  = init_s[q].ct - 4'd7;
      init_s[q].a   = 16'h8000;
      init_s[q].top = '0;
    end
  end

  always_comb
    for (int q = 0; q < 3; q++) byte_ready[q] = (cnt[q] < PW'(WIN));

  // Window update: drop the bytes consumed, append the incoming byte.
  win_t          win_n [3];
  logic [PW-1:0] cnt_n [3];
  logic [PW-1:0] sh    [3];
  always_comb begin
    for (int q = 0; q < 3; q++) begin
      sh[q] = init_done[q] ? consumed[q] : '0;
      if (!init_done[q] && cnt[q] == PW'(WIN)) sh[q] = init_s[q].pos;
      for (int j = 0; j < WIN; j++)
        win_n[q][j] = (j + int'(sh[q]) < WIN) ? win[q][j + int'(sh[q])] : 8'h00;
      cnt_n[q] = cnt[q] - sh[q];
      if (byte_valid[q] && byte_ready[q]) begin
        win_n[q][cnt_n[q]] = byte_in[q];
        cnt_n[q]           = cnt_n[q] + PW'(1);
      end
    end
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < 3; q++) begin
        win[q]       <= '0;
        cnt[q]       <= '0;
        mq[q]        <= '0;
        init_done[q] <= 1'b0;
        for (int x = 0; x < NCTX; x++) begin
          cx_i[q][x] <= mq_init_state(x);
          cx_m[q][x] <= 1'b0;
        end
      end
    end else if (start) begin
      for (int q = 0; q < 3; q++) begin
        win[q]       <= '0;
        cnt[q]       <= '0;
        mq[q]        <= '0;
        init_done[q] <= 1'b0;
        for (int x = 0; x < NCTX; x++) begin
          cx_i[q][x] <= mq_init_state(x);
          cx_m[q][x] <= 1'b0;
        end
      end
    end else begin
      for (int q = 0; q < 3; q++) begin
        win[q] <= win_n[q];
        cnt[q] <= cnt_n[q];
        if (!init_done[q] && cnt[q] == PW'(WIN)) begin
          init_done[q] <= 1'b1;
          mq[q]        <= init_s[q];
          mq[q].pos    <= '0;
        end
      end
      if (rsp.ack) begin
        mq[ps]     <= s0;
        mq[ps].pos <= '0;
        for (int x = 0; x < NCTX; x++) begin
          cx_i[ps][x] <= li[x];
          cx_m[ps][x] <= lm[x];
        end
      end
    end
  end

endmodule
