// tb_ebc_cf_fsm: test of the column-switching scan controller.
//
// The testbench models the columns of a CF: every row of a column that enters
// is marked at random as a significance-propagation (Pass 1) sample or as a
// refinement/cleanup sample, and C0 receives a new column at each switch. It
// drives the controller's eligibility inputs from that model, acknowledges
// decodes and allows switches at random (in a second phase always), lets a
// non-Pass 1 decode at row 0 sometimes cover the whole column as a run-length
// decode would, and checks:
//   - a selected sample is open and of the right kind, Pass 1 samples only
//     in C1/C2 and the others only in C2/C3;
//   - rows of a sub-scan are visited top to bottom;
//   - no column leaves C3 with an open row, and a switch only when allowed;
//   - with decodes always acknowledged and switches always allowed, a sample
//     is decoded (or a bubble switch made) in every cycle.
// It counts "four Pass 1 samples" switches, bubbles and held switches, which
// must all occur.
module tb_ebc_cf_fsm;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic            rst_n = 1'b0, start = 1'b0;
  logic [2:1][3:0] p1_elig;
  logic [3:1][3:0] unvis;
  logic            ack = 1'b0;
  logic [1:0]      done_row;
  logic            can_switch = 1'b0;
  logic            sel_valid;
  logic [1:0]      sel_col, sel_row;
  logic            sel_p1, do_switch, bubble;
  logic [1:0]      state_o;

  ebc_cf_fsm dut (.*);

  // Column model, slot 0 = C0 .. 4 = C4.
  logic [3:0] kp1  [5];      // row is a Pass 1 sample
  logic [3:0] open [5];      // row not yet decoded

  always_comb begin
    for (int c = 1; c <= 2; c++) p1_elig[c] = kp1[c] & open[c];
    for (int c = 1; c <= 3; c++) unvis[c] = open[c];
  end

  int checks = 0, failures = 0;
  int n_cond0 = 0, n_bubble = 0, n_hold = 0, n_dec = 0, n_idle = 0, n_sw = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_col(int s);
    int kind;
    kind = $urandom % 4;
    open[s] = 4'hF;
    // Mostly mixed columns; sometimes all Pass 1 or none.
    kp1[s] = (kind == 0) ? 4'hF : (kind == 1) ? 4'h0 : 4'($urandom);
  endtask

  int last_key = -1, last_row = -1;

  task automatic cycle(bit full);
    bit         dec, sw;
    logic [1:0] sc, sr, dr;
    int         key;
    ack        = full || ($urandom % 4) != 0;
    can_switch = full || ($urandom % 3) != 0;
    done_row   = 2'd0;
    #1;
    done_row = sel_row;
    if (sel_valid && !sel_p1 && sel_row == 2'd0 && ($urandom % 4) == 0 && open[sel_col] == 4'hF &&
        kp1[sel_col] == 4'h0)
      done_row = 2'd3;                            // run-length decode of the whole column
    #1;
    if (sel_valid) begin
      checks++;
      if (sel_p1 ? !(sel_col inside {2'd1, 2'd2}) || !p1_elig[sel_col][sel_row]
                 : !(sel_col inside {2'd2, 2'd3}) || !open[sel_col][sel_row] ||
                   kp1[sel_col][sel_row]) begin
        failures++;
        if (failures < 10) $display("FAIL select col %0d row %0d p1 %0b", sel_col, sel_row, sel_p1);
      end
    end
    if (do_switch) begin
      logic [3:0] rest;
      // Rows of C3 still open once this cycle's decode is done.
      rest = open[3];
      if (sel_valid && ack && sel_col == 2'd3)
        for (int r = 0; r < 4; r++) if (r >= int'(sel_row) && r <= int'(done_row)) rest[r] = 1'b0;
      checks += 2;
      if (!can_switch) begin failures++; $display("FAIL switch not allowed"); end
      if (rest != 4'h0) begin failures++; $display("FAIL column left C3 with rows %b open", rest); end
    end
    if (full && !(sel_valid && ack) && !bubble && !do_switch) n_idle++;
    if (dut.pend && !can_switch) n_hold++;
    if (bubble && do_switch) n_bubble++;
    if (sel_valid && ack && sel_p1 && dut.want_sw) n_cond0++;
    dec = sel_valid && ack;
    sw  = do_switch;
    sc  = sel_col;
    sr  = sel_row;
    dr  = done_row;
    key = n_sw * 8 + int'(sel_col) * 2 + int'(sel_p1);
    if (dec) begin
      // Within one sub-scan of a column the rows go top to bottom.
      checks++;
      if (key == last_key && int'(sr) <= last_row) begin
        failures++;
        if (failures < 10) $display("FAIL row order: row %0d after %0d", sr, last_row);
      end
      last_key = key;
      last_row = int'(dr);
    end
    @(negedge clk);
    // Model update for the clock edge just passed.
    if (dec) begin
      n_dec++;
      for (int r = 0; r < 4; r++)
        if (r >= int'(sr) && r <= int'(dr)) open[sc][r] = 1'b0;
    end
    if (sw) begin
      n_sw++;
      for (int s = 4; s > 0; s--) begin kp1[s] = kp1[s-1]; open[s] = open[s-1]; end
      new_col(0);
    end
  endtask

  initial begin
    for (int s = 0; s < 5; s++) begin
      open[s] = 4'h0; kp1[s] = 4'h0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int i = 0; i < 20000; i++) cycle(1'b0);
    for (int i = 0; i < 20000; i++) cycle(1'b1);
    checks++;
    if (n_idle != 0) begin failures++; $display("FAIL %0d idle cycles at full rate", n_idle); end
    checks += 3;
    if (n_cond0 == 0) begin failures++; $display("FAIL no four-Pass-1 switch"); end
    if (n_bubble == 0) begin failures++; $display("FAIL no bubble"); end
    if (n_hold == 0) begin failures++; $display("FAIL no held switch"); end
    $display("decodes=%0d switches=%0d cond0=%0d bubbles=%0d held=%0d", n_dec, n_sw, n_cond0,
             n_bubble, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
