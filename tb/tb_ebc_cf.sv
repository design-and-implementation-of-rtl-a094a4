// tb_ebc_cf: test of the context-formation unit in a short bit-plane chain.
//
// A CF can only be judged by the bits it decodes, so this testbench wires
// three CFs (planes 2, 1, 0) with their arithmetic decoders and register banks,
// a column feeder and a line buffer into a small decoder of 16 x 16
// code-blocks, the same way the full decoder does. The reference encoder
// produces one terminated segment per pass; every decoded coefficient is
// compared with the original. The testbench also watches each CF directly:
// a switch only when the lower plane takes or C4 is already sent, Pass 1
// decodes only of samples with a significant neighbour, and it counts the
// significance propagation, refinement, cleanup and run-length decodes and
// bubbles of each CF, which must all occur.
module tb_ebc_cf;
  import ebc_pkg::*;
  import tb_ebc_ref_pkg::*;

  localparam int N    = 3;
  localparam int W    = 16;
  localparam int H    = 16;
  localparam int NBLK = 6;
  localparam int XW   = $clog2(W);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, start = 1'b0;
  band_t band = BAND_LL;
  logic [3:0] num_planes = 4'd3;

  // ---------------------------------------------------------------- chain
  cf_col_t           col_dn  [N+1];
  logic              vld_dn  [N+1];
  logic              take_up [N];
  logic [3:0][N-1:0] mag_dn  [N+1];
  logic [3:0]        cf_dn   [N+1];
  logic [N+1:0]      prev_dn [N+1];
  logic [XW-1:0]     lb_raddr, ox;
  logic [N+1:0]      lb_rdata;
  logic              out_real, done;
  logic [1:0]        os;
  logic [N-1:0][2:0][7:0] bs_data;
  logic [N-1:0][2:0]      bs_valid, bs_ready;
  cf_col_t           raw0;

  ebc_feeder #(.NPLANES(N), .CB_W(W), .CB_H(H)) u_feeder (
    .clk, .rst_n, .start, .take(take_up[N-1]), .col_done(out_real),
    .col(col_dn[N]), .prev(prev_dn[N]), .valid(vld_dn[N]), .lb_raddr, .lb_rdata, .done);
  assign mag_dn[N] = '0;
  assign cf_dn[N]  = '0;

  for (genvar k = 0; k < N; k++) begin : g_stage
    fad_req_t req;
    fad_rsp_t rsp;
    logic     sw, down_take, active;
    logic [4:0][N+1:0] pw;
    cf_col_t  raw;
    logic     ev_p1, ev_mr, ev_cu, ev_run, ev_bubble, ev_fad_stall;
    assign active    = k < int'(num_planes);
    assign down_take = (k == 0) ? vld_dn[0] : take_up[(k == 0) ? 0 : k - 1];
    ebc_cf #(.NPLANES(N), .PLANE(k)) dut (
      .clk, .rst_n, .start, .active, .band,
      .up_col(col_dn[k+1]), .up_valid(vld_dn[k+1]), .up_take(take_up[k]), .prev_word(pw),
      .out_col(col_dn[k]), .out_raw(raw), .out_valid(vld_dn[k]), .down_take, .do_switch(sw),
      .fad_req(req), .fad_rsp(rsp),
      .ev_p1, .ev_mr, .ev_cu, .ev_run, .ev_bubble, .ev_fad_stall);
    ebc_fad u_fad (.clk, .rst_n, .start, .req, .rsp,
      .byte_in(bs_data[k]), .byte_valid(bs_valid[k]), .byte_ready(bs_ready[k]));
    ebc_mag_reb #(.NPLANES(N), .PLANE(k)) u_reb (
      .clk, .rst_n, .start, .shift(sw), .in_mag(mag_dn[k+1]), .in_cf(cf_dn[k+1]),
      .in_prev(prev_dn[k+1]), .cf_c4(raw), .prev_word(pw),
      .out_mag(mag_dn[k]), .out_cf(cf_dn[k]), .out_prev(prev_dn[k]));
  end
  assign raw0 = g_stage[0].raw;

  logic [3:0] osign;
  always_comb for (int r = 0; r < 4; r++) osign[r] = raw0.row[r].sign & (mag_dn[0][r] != '0);
  assign out_real = vld_dn[0] & ~col_dn[0].pad;
  always_ff @(posedge clk)
    if (start) begin ox <= '0; os <= '0; end
    else if (out_real) begin
      ox <= ox + 1'b1;
      if (ox == XW'(W - 1)) os <= os + 1'b1;
    end
  ebc_line_buffer #(.WIDTH(N + 2), .DEPTH(W)) u_lb (
    .clk, .we(out_real), .waddr(ox), .wdata({cf_dn[0][3], osign[3], mag_dn[0][3]}),
    .raddr(lb_raddr), .rdata(lb_rdata));

  // ---------------------------------------------------------------- stimulus
  int checks = 0, failures = 0;
  cblk_t    cb;
  cstream_t cs;
  int       ptr [N][3];
  logic     feeding = 1'b0;

  always_ff @(posedge clk)
    for (int k = 0; k < N; k++)
      for (int q = 0; q < 3; q++) begin
        int np;
        np = ptr[k][q];
        if (bs_valid[k][q] && bs_ready[k][q]) np = np + 1;
        if (start) np = 0;
        ptr[k][q]     <= np;
        bs_data[k][q] <= (np < cs.seg[k][q].size()) ? cs.seg[k][q][np] : 8'hFF;
      end
  always_comb
    for (int k = 0; k < N; k++) bs_valid[k] = {3{feeding & ~start}};

  int n_ev [N][5];
  int ncols;
  for (genvar k = 0; k < N; k++) begin : g_mon
    always @(posedge clk) if (rst_n && !start) begin
      if (g_stage[k].ev_p1)     n_ev[k][0]++;
      if (g_stage[k].ev_mr)     n_ev[k][1]++;
      if (g_stage[k].ev_cu)     n_ev[k][2]++;
      if (g_stage[k].ev_run)    n_ev[k][3]++;
      if (g_stage[k].ev_bubble) n_ev[k][4]++;
      // A switch must not overwrite an untaken column in C4.
      if (g_stage[k].sw && g_stage[k].dut.col[4].fwd && !g_stage[k].dut.sent &&
          !g_stage[k].down_take) begin
        failures++;
        $display("FAIL plane %0d switched over an untaken column", k);
      end
      // A Pass 1 decode needs a significant neighbour.
      if (g_stage[k].ev_p1 && g_stage[k].req.zc_ctx == 5'd0) begin
        failures++;
        $display("FAIL plane %0d Pass 1 decode with context 0", k);
      end
    end
  end

  always @(posedge clk) if (rst_n && out_real) begin
    ncols++;
    for (int r = 0; r < 4; r++) begin
      int y, m;
      y = int'(os) * 4 + r;
      m = cb.mag[y][ox];
      checks++;
      if (int'(mag_dn[0][r]) != m || (m != 0 && osign[r] != cb.sgn[y][ox])) begin
        failures++;
        if (failures < 10) $display("FAIL (x=%0d,y=%0d): got %0d/%0b expected %0d/%0b", ox, y,
                                    mag_dn[0][r], osign[r], m, cb.sgn[y][ox]);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ptr[k, q]) ptr[k][q] = 0;
    foreach (n_ev[k, e]) n_ev[k][e] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      int t0, np;
      np = (b % 3) + 1;
      make_cblk(cb, W, H, np, band_t'(b % 4), (b * 37) % 90);
      ebc_encode(cb, cs);
      ncols = 0;
      @(negedge clk);
      num_planes = 4'(np);
      band       = band_t'(b % 4);
      start      = 1'b1;
      feeding    = 1'b1;
      @(negedge clk);
      start = 1'b0;
      t0 = $time;
      while (!done) @(negedge clk);
      checks++;
      if (ncols != W * H / 4) begin failures++; $display("FAIL block %0d: %0d columns", b, ncols); end
      // Rate: about one sample per cycle per plane plus the fill.
      checks++;
      if (($time - t0) / 10 > 2 * W * H + 100 * N) begin failures++; $display("FAIL block %0d slow", b); end
      feeding = 1'b0;
      repeat (5) @(negedge clk);
    end
    for (int k = 0; k < N; k++) begin
      $display("plane %0d: p1=%0d mr=%0d cu=%0d run=%0d bubble=%0d", k, n_ev[k][0], n_ev[k][1],
               n_ev[k][2], n_ev[k][3], n_ev[k][4]);
      // Plane 2 is the top plane in the three-plane blocks: cleanup only there.
      for (int e = 0; e < 5; e++) begin
        if (k == N - 1 && e < 2) continue;
        checks++;
        if (n_ev[k][e] == 0) begin failures++; $display("FAIL plane %0d event %0d never seen", k, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
