// tb_ebc_feeder: test of the column feeder.
//
// A small code-block (16 x 16, two bit-planes, so 12 flush columns) is fed
// twice. A model of the decoder takes columns at random and lets every real
// column leave a random number of columns later (at most the 10 the chain can
// hold), writing a random word for it into a model line buffer. Checked: the
// column order, first/last/pad marks, the previous-stripe word (zero in
// stripe 0, else the line-buffer word of the same column), that no column of
// stripe s > 0 is offered before its upper neighbour left, the number of
// columns, and done. A second run takes a column every cycle with a fixed
// latency and checks the rate: one column per cycle without a gap.
module tb_ebc_feeder;
  import ebc_pkg::*;
  localparam int N    = 2;
  localparam int W    = 16;
  localparam int H    = 16;
  localparam int NPAD = 5 * N + 2;
  localparam int NCOL = W * H / 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst_n = 1'b0, start = 1'b0, take = 1'b0, col_done = 1'b0;
  cf_col_t              col;
  logic [N+1:0]         prev;
  logic                 valid;
  logic [$clog2(W)-1:0] lb_raddr;
  logic [N+1:0]         lb_rdata;
  logic                 done;

  ebc_feeder #(.NPLANES(N), .CB_W(W), .CB_H(H)) dut (.*);

  logic [N+1:0] lb [W];
  assign lb_rdata = lb[lb_raddr];

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input bit rnd);
    int issued, left, gaps, cyc;
    int due [$];                       // issue index at which each real column leaves
    issued = 0; left = 0; gaps = 0; cyc = 0;
    for (int x = 0; x < W; x++) lb[x] = (N+2)'($urandom);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      cyc++;
      if (cyc > 20 * NCOL) break;
      take     = valid && (!rnd || ($urandom % 4) != 0);
      col_done = 1'b0;
      // A real column leaves once enough later columns entered, or at the end.
      if (due.size() > 0 && (issued >= due[0] || issued == NCOL + NPAD)) begin
        int lx;
        col_done = 1'b1;
        void'(due.pop_front());
        lx = left % W;
        lb[lx] = (N+2)'($urandom);
        left++;
      end
      #1;
      if (valid) begin
        int ex, es;
        bit pad;
        pad = issued >= NCOL;
        ex  = issued % W;
        es  = issued / W;
        checks++;
        if (col.pad != pad || !col.fwd ||
            (!pad && (col.first != (ex == 0) || col.last != (ex == W - 1))) ||
            (pad && (!col.first || !col.last))) begin
          failures++;
          if (failures < 10) $display("FAIL marks of column %0d: %p", issued, col);
        end
        checks++;
        if (!pad && (es == 0 ? prev != '0 : prev != lb[ex])) begin
          failures++;
          if (failures < 10) $display("FAIL prev of column %0d", issued);
        end
        checks++;
        if (!pad && es > 0 && left <= issued - W) begin
          failures++;
          $display("FAIL column %0d offered before its upper neighbour left", issued);
        end
      end else if (!rnd && issued < NCOL + NPAD) gaps++;
      if (take) begin
        if (issued < NCOL) due.push_back(issued + (rnd ? 1 + $urandom % 10 : 8));
        issued++;
      end
      @(negedge clk);
      if (col_done && left == NCOL) begin
        // done follows the last column by one cycle
        checks++;
        if (!done) begin failures++; $display("FAIL done late"); end
      end
    end
    take = 1'b0;
    col_done = 1'b0;
    checks++;
    if (issued > NCOL + NPAD || issued < NCOL || left != NCOL) begin
      failures++;
      $display("FAIL counts: issued %0d left %0d", issued, left);
    end
    if (!rnd) begin
      checks++;
      if (gaps != 0) begin failures++; $display("FAIL %0d idle cycles at full rate", gaps); end
    end
    $display("block: random=%0b cycles=%0d columns=%0d idle=%0d", rnd, cyc, issued, gaps);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_block(1'b1);
    run_block(1'b0);
    run_block(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
