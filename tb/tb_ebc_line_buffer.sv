// tb_ebc_line_buffer: random write/read test of the 12 x 64 line buffer.
//
// Every word is written once, then random writes and reads are mixed. The
// read port is asynchronous: a read of an address shows the data of the last
// write that completed at a clock edge before it.
module tb_ebc_line_buffer;
  localparam int WIDTH = 12;
  localparam int DEPTH = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     we = 1'b0;
  logic [$clog2(DEPTH)-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0]         wdata = '0, rdata;

  ebc_line_buffer dut (.*);

  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 6'(a); wdata = WIDTH'($urandom);
      model[a] = wdata;
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // The write of the previous cycle has completed: check a random read.
      raddr = 6'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: got %h expected %h", raddr, rdata, model[raddr]);
      end
      we    = 1'($urandom & 1);
      waddr = 6'($urandom);
      wdata = WIDTH'($urandom);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
