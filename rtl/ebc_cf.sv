// ebc_cf: context formation (CF) of one bit-plane k of the word-level EBC
// decoder.
//
// The CF holds five column slots C4 (left, oldest) .. C0 (right, newest), each
// with four current-stripe PEs (ebc_pe) and one previous-stripe PE
// (ebc_pe_prev). C0..C3 form the context window area; C4 is the output buffer
// that keeps a finished column until the CF of bit-plane k-1 takes it, and
// also serves as left neighbour of C3. The column-switching controller
// (ebc_cf_fsm) picks one sample per cycle; the CF classifies its pass from the
// PE states (significant before -> refinement; not significant but a
// significant neighbour -> significance propagation; else cleanup), forms the
// zero-coding, sign-coding, refinement or run-length contexts from the eight
// neighbours and sends them to the FAD, and writes the decoded bits back into
// the PEs. A switch shifts all slots left and takes the next column, already
// converted to plane k's state, from the CF of plane k+1 (or from the column
// feeder for the top plane).
//
// Significance of a neighbour: d-hat | (d & v) in the cleanup pass,
// and the same without samples decoded in this plane's cleanup pass for the
// other two passes. Horizontal neighbours are masked at the first and last
// column of a stripe; the row below the stripe is never used (vertically
// causal mode). The previous-stripe row comes from the magnitude register
// bank as full coefficient words.
//
// An inactive CF (plane above the code-block's number of bit-planes) decodes
// nothing and passes columns on, one per cycle.
//
// Timing: fad_req is combinational from the registers; fad_rsp.ack in the same
// cycle commits the decode. up_take / down_take are single-cycle transfer
// strobes of the column hand-over; out_col is valid while out_valid is high.
// rst_n also disables the assertions below, so lint reports it as used both
// synchronously and asynchronously; that is intended.
module ebc_cf
  import ebc_pkg::*;
#(
  parameter int NPLANES = 10,
  parameter int PLANE   = 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      active,
  input  band_t                     band,
  // column from the upper bit-plane (already in plane-k form)
  input  cf_col_t                   up_col,
  input  logic                      up_valid,
  output logic                      up_take,
  // previous-stripe coefficient word of each slot (from the Mag. REB)
  input  logic [4:0][NPLANES+1:0]   prev_word,
  // column to the lower bit-plane (converted to plane k-1 form)
  output cf_col_t                   out_col,
  output cf_col_t                   out_raw,     // C4 as held at plane k
  output logic                      out_valid,
  input  logic                      down_take,
  output logic                      do_switch,
  // four-symbol arithmetic decoder
  output fad_req_t                  fad_req,
  input  fad_rsp_t                  fad_rsp,
  // events, one strobe per cycle
  output logic                      ev_p1,
  output logic                      ev_mr,
  output logic                      ev_cu,
  output logic                      ev_run,
  output logic                      ev_bubble,
  output logic                      ev_fad_stall
);
  cf_col_t col [5];
  logic    sent;              // C4 already taken by the lower plane

  // ------------------------------------------------------------ PE array
  logic [4:0][3:0] phi, phi_mr, gam;
  pe_reg_t [3:0]   c4_next;
  logic [4:0]      pphi, pphi_mr, psign;

  for (genvar c = 0; c < 5; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      pe_reg_t nxt;
      ebc_pe u_pe (.r(col[c].row[r]), .phi(phi[c][r]), .phi_mr(phi_mr[c][r]),
                   .gamma(gam[c][r]), .nxt(nxt));
      if (c == 4) begin : g_out
        assign c4_next[r] = nxt;
      end
    end
    ebc_pe_prev #(.NPLANES(NPLANES), .PLANE(PLANE)) u_pe2 (
      .word(prev_word[c]), .phi(pphi[c]), .phi_mr(pphi_mr[c]), .sign(psign[c]));
  end

  // Significance grid: row index 0 = previous stripe, 1..4 = rows 0..3,
  // 5 = row below the stripe (always insignificant, causal mode).
  logic [4:0][5:0] g_cu, g_mr, g_sg;
  always_comb begin
    for (int c = 0; c < 5; c++) begin
      g_cu[c][0] = pphi[c];
      g_mr[c][0] = pphi_mr[c];
      g_sg[c][0] = psign[c];
      for (int r = 0; r < 4; r++) begin
        g_cu[c][r+1] = phi[c][r];
        g_mr[c][r+1] = phi_mr[c][r];
        g_sg[c][r+1] = col[c].row[r].sign;
      end
      g_cu[c][5] = 1'b0;
      g_mr[c][5] = 1'b0;
      g_sg[c][5] = 1'b0;
    end
  end

  typedef struct packed {
    logic [1:0] h;
    logic [1:0] v;
    logic [2:0] d;
    logic       any;
    logic [1:0] hc;
    logic [1:0] vc;
  } nb_t;

  // Neighbourhood of sample (c, r), c in 1..3, with significance grid g.
  function automatic nb_t neigh(input logic [4:0][5:0] g, input logic [4:0][5:0] sg,
                                input int c, input int r, input logic lm, input logic rm);
    nb_t  o;
    logic l, rr, u, dn, ul, ur, dl, dr;
    logic sl, sr, su, sd;
    int   gi;
    gi = r + 1;
    l  = lm & g[c+1][gi];      sl = sg[c+1][gi];
    rr = rm & g[c-1][gi];      sr = sg[c-1][gi];
    u  = g[c][gi-1];           su = sg[c][gi-1];
    dn = g[c][gi+1];           sd = sg[c][gi+1];
    ul = lm & g[c+1][gi-1];
    ur = rm & g[c-1][gi-1];
    dl = lm & g[c+1][gi+1];
    dr = rm & g[c-1][gi+1];
    o.h   = {1'b0, l} + {1'b0, rr};
    o.v   = {1'b0, u} + {1'b0, dn};
    o.d   = {2'b0, ul} + {2'b0, ur} + {2'b0, dl} + {2'b0, dr};
    o.any = l | rr | u | dn | ul | ur | dl | dr;
    o.hc  = sc_contrib(l, sl, rr, sr);
    o.vc  = sc_contrib(u, su, dn, sd);
    return o;
  endfunction

  nb_t          nb_cu [4][4];   // [col 1..3][row]
  nb_t          nb_mr [4][4];
  logic [3:1]   real_c;
  logic [2:1][3:0] p1_elig;
  logic [3:1][3:0] unvis;

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        nb_cu[c][r] = '0;
        nb_mr[c][r] = '0;
      end
    for (int c = 1; c < 4; c++) begin
      real_c[c] = col[c].fwd & ~col[c].pad;
      for (int r = 0; r < 4; r++) begin
        nb_cu[c][r] = neigh(g_cu, g_sg, c, r, ~col[c].first, ~col[c].last);
        nb_mr[c][r] = neigh(g_mr, g_sg, c, r, ~col[c].first, ~col[c].last);
        unvis[c][r] = real_c[c] & ~col[c].row[r].v;
        if (c < 3)
          p1_elig[c][r] = real_c[c] & ~col[c].row[r].v & ~col[c].row[r].dh & nb_mr[c][r].any;
      end
    end
  end

  // ------------------------------------------------------------ controller
  logic       sel_valid, sel_p1, fsm_switch, bubble;
  logic [1:0] sel_col, sel_row, done_row, fsm_state;
  logic       can_switch;
  logic       ack;

  assign can_switch = up_valid & (~col[4].fwd | sent | down_take);

  ebc_cf_fsm u_fsm (
    .clk, .rst_n, .start,
    .p1_elig, .unvis,
    .ack, .done_row, .can_switch,
    .sel_valid, .sel_col, .sel_row, .sel_p1,
    .do_switch(fsm_switch), .bubble, .state_o(fsm_state));

  // ------------------------------------------------------------ contexts
  pe_reg_t sr;
  logic    is_run, is_mr;
  nb_t     nsel;
  logic [2:0] sci;                  // selected column as an index into the five slots
  assign sci = {1'b0, sel_col};

  always_comb begin
    sr      = col[sci].row[sel_row];
    nsel    = sel_p1 ? nb_mr[sel_col][sel_row] : nb_cu[sel_col][sel_row];
    is_mr   = ~sel_p1 & sr.dh;
    // Run-length mode: start of a cleanup sub-scan on a column whose four
    // samples are all undecoded, insignificant and without significant
    // neighbours.
    is_run  = ~sel_p1 & ~sr.dh & (sel_row == 2'd0) & (unvis[sel_col] == 4'hF);
    for (int r = 0; r < 4; r++)
      if (col[sci].row[r].dh || nb_cu[sel_col][r].any) is_run = 1'b0;

    fad_req        = '0;
    fad_req.valid  = active & sel_valid;
    fad_req.row    = sel_row;
    fad_req.zc_ctx = zc_context(nsel.h, nsel.v, nsel.d, band);
    fad_req.mr_ctx = mr_context(gam[sel_col][sel_row], nb_mr[sel_col][sel_row].any);
    if (sel_p1) begin
      fad_req.kind = REQ_ZCSC;
      fad_req.pass = 2'd1;
    end else if (is_mr) begin
      fad_req.kind = REQ_MR;
      fad_req.pass = 2'd2;
    end else begin
      fad_req.kind = is_run ? REQ_RUN : REQ_ZCSC;
      fad_req.pass = 2'd3;
    end
    for (int r = 0; r < 4; r++) begin
      logic [5:0] sc;
      sc = sel_p1 ? sc_context(nb_mr[sel_col][r].hc, nb_mr[sel_col][r].vc)
                  : sc_context(nb_cu[sel_col][r].hc, nb_cu[sel_col][r].vc);
      fad_req.sc_ctx[r] = sc[4:0];
      fad_req.sc_xor[r] = sc[5];
    end
  end

  assign ack      = fad_req.valid & fad_rsp.ack;
  assign done_row = (is_run && !fad_rsp.rlc) ? 2'd3 : is_run ? fad_rsp.uniform : sel_row;

  // ------------------------------------------------------------ update
  cf_col_t upd [5];
  always_comb begin
    for (int c = 0; c < 5; c++) upd[c] = col[c];
    if (ack) begin
      if (is_run) begin
        for (int r = 0; r < 4; r++)
          if (2'(r) <= done_row) begin
            upd[sci].row[r].d = fad_rsp.rlc && (2'(r) == done_row);
            upd[sci].row[r].v = 1'b1;
            upd[sci].row[r].c = 1'b1;
            if (fad_rsp.rlc && (2'(r) == done_row)) upd[sci].row[r].sign = fad_rsp.sign;
          end
      end else begin
        upd[sci].row[sel_row].d = fad_rsp.mag;
        upd[sci].row[sel_row].v = 1'b1;
        upd[sci].row[sel_row].c = ~sel_p1 & ~is_mr;
        if (fad_rsp.sign_valid) upd[sci].row[sel_row].sign = fad_rsp.sign;
      end
    end
  end

  assign do_switch = active ? fsm_switch : can_switch;
  assign up_take   = do_switch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 5; c++) col[c] <= '0;
      sent <= 1'b0;
    end else if (start) begin
      for (int c = 0; c < 5; c++) col[c] <= '0;
      sent <= 1'b0;
    end else if (do_switch) begin
      for (int c = 1; c < 5; c++) col[c] <= upd[c-1];
      col[0] <= up_col;
      sent   <= 1'b0;
    end else begin
      for (int c = 0; c < 5; c++) col[c] <= upd[c];
      if (down_take) sent <= 1'b1;
    end
  end

  // ------------------------------------------------------------ output
  always_comb begin
    out_raw       = col[4];
    out_col       = col[4];
    out_col.row   = c4_next;
  end
  assign out_valid = col[4].fwd & ~sent;

  assign ev_p1        = ack & sel_p1;
  assign ev_mr        = ack & is_mr;
  assign ev_cu        = ack & ~sel_p1 & ~is_mr & ~is_run;
  assign ev_run       = ack & is_run;
  assign ev_bubble    = active & bubble & do_switch;
  assign ev_fad_stall = fad_req.valid & ~fad_rsp.ack;

  // The lower plane only takes a column that is offered.
  assert property (@(posedge clk) disable iff (!rst_n) down_take |-> out_valid);
  // A column leaving C4 has had every real sample decoded.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (do_switch && active && col[3].fwd && !col[3].pad) |->
                   (upd[3].row[0].v && upd[3].row[1].v && upd[3].row[2].v && upd[3].row[3].v));

endmodule
