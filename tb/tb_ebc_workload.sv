// tb_ebc_workload: sustained throughput of the decoder at its default size on
// the typical case of six magnitude bit-planes and 64 x 64 code-blocks.
//
// Twelve random code-blocks of six planes (all four bands, densities from
// sparse to full) are decoded back to back, every coefficient is compared with
// the original, and the total number of cycles from the first start to the
// last done is measured. The target is one sample per cycle (W x W cycles per
// code-block); the test allows 15 % on top for bubbles, waits for bytes and
// the pipeline fill of every block. It also reports what the measured rate
// means for HDTV 720p 4:2:2 video (1280 x 720 luma + 2 x 640 x 720 chroma
// samples per frame) at a 54 MHz clock.
module tb_ebc_workload;
  import ebc_pkg::*;
  import tb_ebc_ref_pkg::*;

  localparam int NPLANES = 10;
  localparam int CB_W    = 64;
  localparam int CB_H    = 64;
  localparam int NBLK    = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [3:0] num_planes = 4'd1;
  band_t band = BAND_LL;
  logic [NPLANES-1:0][2:0][7:0] bs_data;
  logic [NPLANES-1:0][2:0]      bs_valid;
  logic [NPLANES-1:0][2:0]      bs_ready;
  logic                         coef_valid;
  logic [$clog2(CB_W)-1:0]      coef_x;
  logic [$clog2(CB_H/4)-1:0]    coef_stripe;
  logic [3:0][NPLANES-1:0]      coef_mag;
  logic [3:0]                   coef_sign;
  logic                         done;

  ebc_decoder_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  int busy = 0;
  cblk_t    cb;
  cstream_t cs;
  int       ptr [NPLANES][3];
  logic     feeding = 1'b0;

  // Byte sources: one per stage and pass, 0xFF after the end of the segment.
  always_ff @(posedge clk) begin
    for (int k = 0; k < NPLANES; k++)
      for (int q = 0; q < 3; q++) begin
        int np;
        np = ptr[k][q];
        if (bs_valid[k][q] && bs_ready[k][q]) np = np + 1;
        if (start) np = 0;
        ptr[k][q]     <= np;
        bs_data[k][q] <= (np < cs.seg[k][q].size()) ? cs.seg[k][q][np] : 8'hFF;
      end
  end
  always_comb
    for (int k = 0; k < NPLANES; k++)
      for (int q = 0; q < 3; q++) bs_valid[k][q] = feeding & ~start;

  // Mechanism counters.
  int n_p1, n_mr, n_cu, n_run, n_run_hit, n_run_zero, n_cond0, n_bubble, n_stall, n_hold,
      n_pass, n_prev, n_stuff;
  for (genvar k = 0; k < NPLANES; k++) begin : g_cnt
    always @(posedge clk) if (rst_n && !start) begin
      if (dut.g_stage[k].ev_p1)  n_p1++;
      if (dut.g_stage[k].ev_mr)  n_mr++;
      if (dut.g_stage[k].ev_cu)  n_cu++;
      if (dut.g_stage[k].ev_run) begin
        n_run++;
        if (dut.g_stage[k].rsp.rlc) n_run_hit++; else n_run_zero++;
      end
      if (dut.g_stage[k].ev_bubble)    n_bubble++;
      if (dut.g_stage[k].ev_fad_stall) n_stall++;
      if (dut.g_stage[k].u_cf.u_fsm.sel_valid && dut.g_stage[k].u_cf.ack &&
          dut.g_stage[k].u_cf.u_fsm.sel_p1 && dut.g_stage[k].u_cf.u_fsm.want_sw)
        n_cond0++;
      if (dut.g_stage[k].u_cf.u_fsm.pend && !dut.g_stage[k].u_cf.can_switch) n_hold++;
      if (!dut.g_stage[k].active && dut.g_stage[k].sw) n_pass++;
    end
  end
  always @(posedge clk)
    if (dut.take_up[NPLANES-1] && dut.vld_dn[NPLANES] && dut.prev_dn[NPLANES] != '0) n_prev++;

  // Output check.
  int exp_x, exp_s, ncols;
  always @(posedge clk) if (rst_n && coef_valid) begin
    checks++;
    if (int'(coef_x) != exp_x || int'(coef_stripe) != exp_s) begin
      failures++;
      $display("FAIL order: got x=%0d s=%0d, expected x=%0d s=%0d", coef_x, coef_stripe, exp_x, exp_s);
    end
    for (int r = 0; r < 4; r++) begin
      int y, m;
      bit sg;
      y  = int'(coef_stripe) * 4 + r;
      m  = cb.mag[y][coef_x];
      sg = cb.sgn[y][coef_x];
      checks++;
      if (int'(coef_mag[r]) != m || (m != 0 && coef_sign[r] != sg)) begin
        failures++;
        if (failures < 20)
          $display("FAIL coef (x=%0d,y=%0d): got mag=%0d sign=%0b, expected mag=%0d sign=%0b",
                   coef_x, y, coef_mag[r], coef_sign[r], m, sg);
      end
    end
    ncols++;
    if (exp_x == CB_W - 1) begin exp_x = 0; exp_s++; end
    else exp_x++;
  end

  always @(posedge clk) cycles++;

  // Watchdog.
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NPLANES; k++) for (int q = 0; q < 3; q++) ptr[k][q] = 0;
    n_p1 = 0; n_mr = 0; n_cu = 0; n_run = 0; n_run_hit = 0; n_run_zero = 0; n_cond0 = 0;
    n_bubble = 0; n_stall = 0; n_hold = 0; n_pass = 0; n_prev = 0; n_stuff = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      int t0;
      make_cblk(cb, CB_W, CB_H, 6, band_t'(b % 4), (b * 23) % 95);
      ebc_encode(cb, cs);
      for (int k = 0; k < NPLANES; k++)
        for (int q = 0; q < 3; q++)
          for (int i = 1; i < cs.seg[k][q].size(); i++)
            if (cs.seg[k][q][i-1] == 8'hFF) n_stuff++;
      exp_x = 0; exp_s = 0; ncols = 0;
      @(negedge clk);
      num_planes = 4'd6;
      band  = band_t'(b % 4);
      start = 1'b1;
      feeding = 1'b1;
      @(negedge clk);
      start = 1'b0;
      t0 = cycles;
      while (!done) @(negedge clk);
      checks++;
      if (ncols != CB_W * CB_H / 4) begin
        failures++;
        $display("FAIL block %0d: %0d columns out", b, ncols);
      end
      $display("block %0d: planes=%0d band=%0d cycles=%0d samples=%0d cycles/sample=%0.3f",
               b, 6, b % 4, cycles - t0, CB_W * CB_H,
               real'(cycles - t0) / real'(CB_W * CB_H));
      // Rate: one coefficient per cycle, plus 15 % for bubbles and waits for
      // bytes, plus the fill of 5N + 2 columns of four samples.
      checks++;
      if (real'(cycles - t0) > 1.15 * real'(CB_W * CB_H) + 4.0 * real'(5 * NPLANES + 2)) begin
        failures++;
        $display("FAIL block %0d too slow", b);
      end
      feeding = 1'b0;
      busy += cycles - t0;
    end
    begin
      real cps, msps, fps;
      cps  = real'(busy) / real'(NBLK * CB_W * CB_H);
      msps = 54.0 / cps;
      fps  = msps * 1.0e6 / (1280.0 * 720.0 * 2.0);
      $display("workload: %0d blocks, %0d busy cycles, %0.3f cycles/sample, %0.1f MSamples/s and %0.1f frames/s of 720p 4:2:2 at 54 MHz",
               NBLK, busy, cps, msps, fps);
      checks++;
      if (cps > 1.15) begin failures++; $display("FAIL sustained rate %0.3f cycles/sample", cps); end
    end
    $display("events: p1=%0d mr=%0d cu=%0d run=%0d (hit %0d, zero %0d) cond0=%0d bubble=%0d fad_stall=%0d hold=%0d pass=%0d prev=%0d stuff=%0d",
             n_p1, n_mr, n_cu, n_run, n_run_hit, n_run_zero, n_cond0, n_bubble, n_stall,
             n_hold, n_pass, n_prev, n_stuff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
