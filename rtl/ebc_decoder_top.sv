// ebc_decoder_top: word-level embedded block coding (EBC) decoder of JPEG 2000.
//
// All magnitude bit-planes of a code-block are decoded in parallel, one stage
// per bit-plane: stage k has a context formation unit (ebc_cf), a four-symbol
// arithmetic decoder (ebc_fad) and a magnitude register bank (ebc_mag_reb).
// Columns of the code-block enter the stage of the most significant plane
// (NPLANES-1) from the column feeder, move down from stage to stage as each
// CF finishes them, and leave stage 0 as decoded coefficients, one column of
// four coefficients at a time. The sign travels with the column and is
// decoded in whichever stage the coefficient becomes significant. The last row
// of every stripe is written to the line buffer and read back as the
// previous-stripe row of the next stripe.
//
// The code stream must use the parallel mode: vertically causal contexts and
// a terminated MQ segment for every coding pass. Each stage has three byte
// inputs, one per coding pass of its plane (index 0 = significance
// propagation, 1 = refinement, 2 = cleanup); after the last byte of a segment
// the source must keep supplying 0xFF. num_planes is the number of magnitude
// bit-planes of the code-block (1..NPLANES): the stages above it pass columns
// through without decoding.
//
// Interface: pulse start (with num_planes and band stable until done) to
// decode one code-block of CB_W x CB_H coefficients. coef_valid marks one
// output column: coef_x, coef_stripe, and magnitude / sign of its four rows
// (row 0 on top). done rises after the last column. Throughput is one sample
// per cycle in each stage when the byte inputs keep up.
//
// The stage structure, the column hand-over, the 12 x 64 line buffer and the
// defaults (10 magnitude planes, 64 x 64 code-blocks) follow the architecture.
// The feedback path for 32 x 32 code-blocks is not built: CB_W must exceed the
// 5 * NPLANES columns the CF chain can hold.
//
// Lint note: rst_n is an asynchronous reset of the registers and also the
// disable condition of the handshake assertions in the CFs, the controllers
// and the feeder; a warning that it is used both ways is expected and harmless.
module ebc_decoder_top
  import ebc_pkg::*;
#(
  parameter int NPLANES = 10,
  parameter int CB_W    = 64,
  parameter int CB_H    = 64,
  parameter int WIN     = 12
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic [3:0]                        num_planes,
  input  band_t                             band,
  input  logic [NPLANES-1:0][2:0][7:0]      bs_data,
  input  logic [NPLANES-1:0][2:0]           bs_valid,
  output logic [NPLANES-1:0][2:0]           bs_ready,
  output logic                              coef_valid,
  output logic [$clog2(CB_W)-1:0]           coef_x,
  output logic [$clog2(CB_H/4)-1:0]         coef_stripe,
  output logic [3:0][NPLANES-1:0]           coef_mag,
  output logic [3:0]                        coef_sign,
  output logic                              done
);
  localparam int XW = $clog2(CB_W);
  localparam int SW = $clog2(CB_H / 4);

  // Stage k receives from index k+1; index NPLANES is the feeder.
  cf_col_t                 col_dn   [NPLANES+1];
  logic                    vld_dn   [NPLANES+1];
  logic                    take_up  [NPLANES];     // stage k takes from k+1
  logic [3:0][NPLANES-1:0] mag_dn   [NPLANES+1];
  logic [3:0]              cf_dn    [NPLANES+1];
  logic [NPLANES+1:0]      prev_dn  [NPLANES+1];
  cf_col_t                 raw0;

  // ------------------------------------------------------------ feeder
  logic [XW-1:0]        lb_raddr;
  logic [NPLANES+1:0]   lb_rdata;
  logic                 out_real;

  ebc_feeder #(.NPLANES(NPLANES), .CB_W(CB_W), .CB_H(CB_H)) u_feeder (
    .clk, .rst_n, .start,
    .take(take_up[NPLANES-1]), .col_done(out_real),
    .col(col_dn[NPLANES]), .prev(prev_dn[NPLANES]), .valid(vld_dn[NPLANES]),
    .lb_raddr, .lb_rdata, .done);

  assign mag_dn[NPLANES] = '0;
  assign cf_dn[NPLANES]  = '0;

  // ------------------------------------------------------------ stages
  for (genvar k = 0; k < NPLANES; k++) begin : g_stage
    fad_req_t                req;
    fad_rsp_t                rsp;
    logic                    sw;
    logic [4:0][NPLANES+1:0] pw;
    cf_col_t                 raw;
    logic                    down_take;
    logic                    active;
    logic                    ev_p1, ev_mr, ev_cu, ev_run, ev_bubble, ev_fad_stall;

    assign active = (k < int'(num_planes));

    if (k == 0) begin : g_sink
      assign down_take = vld_dn[0];          // the output always accepts
    end else begin : g_link
      assign down_take = take_up[k-1];
    end

    ebc_cf #(.NPLANES(NPLANES), .PLANE(k)) u_cf (
      .clk, .rst_n, .start, .active, .band,
      .up_col(col_dn[k+1]), .up_valid(vld_dn[k+1]), .up_take(take_up[k]),
      .prev_word(pw),
      .out_col(col_dn[k]), .out_raw(raw), .out_valid(vld_dn[k]), .down_take,
      .do_switch(sw),
      .fad_req(req), .fad_rsp(rsp),
      .ev_p1, .ev_mr, .ev_cu, .ev_run, .ev_bubble, .ev_fad_stall);

    ebc_fad #(.WIN(WIN)) u_fad (
      .clk, .rst_n, .start, .req, .rsp,
      .byte_in(bs_data[k]), .byte_valid(bs_valid[k]), .byte_ready(bs_ready[k]));

    ebc_mag_reb #(.NPLANES(NPLANES), .PLANE(k)) u_reb (
      .clk, .rst_n, .start, .shift(sw),
      .in_mag(mag_dn[k+1]), .in_cf(cf_dn[k+1]), .in_prev(prev_dn[k+1]),
      .cf_c4(raw), .prev_word(pw),
      .out_mag(mag_dn[k]), .out_cf(cf_dn[k]), .out_prev(prev_dn[k]));

    if (k == 0) begin : g_raw0
      assign raw0 = raw;
    end
  end

  // ------------------------------------------------------------ output
  logic [XW-1:0] ox;
  logic [SW-1:0] os;

  assign out_real    = vld_dn[0] & ~col_dn[0].pad;
  assign coef_valid  = out_real;
  assign coef_x      = ox;
  assign coef_stripe = os;
  assign coef_mag    = mag_dn[0];
  always_comb
    for (int r = 0; r < 4; r++) coef_sign[r] = raw0.row[r].sign & (mag_dn[0][r] != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ox <= '0;
      os <= '0;
    end else if (start) begin
      ox <= '0;
      os <= '0;
    end else if (out_real) begin
      if (ox == XW'(CB_W - 1)) begin
        ox <= '0;
        os <= os + 1'b1;
      end else begin
        ox <= ox + 1'b1;
      end
    end
  end

  // Last row of each stripe into the line buffer: {cf, sign, magnitude}.
  ebc_line_buffer #(.WIDTH(NPLANES + 2), .DEPTH(CB_W)) u_lb (
    .clk, .we(out_real), .waddr(ox),
    .wdata({cf_dn[0][3], coef_sign[3], mag_dn[0][3]}),
    .raddr(lb_raddr), .rdata(lb_rdata));

  initial assert (CB_W > 5 * NPLANES)
    else $error("CB_W must exceed the 5 * NPLANES columns held by the CF chain");

endmodule
