// tb_ebc_mag_reb: test of the magnitude register bank of one bit-plane.
//
// Random columns (magnitude bits, cleanup flags, previous-stripe words) are
// shifted in at random moments; a reference five-slot shift register tracks
// them. At the output the bank must show the slot that entered five shifts
// earlier, with the plane-k magnitude bit replaced by the decoded one of the
// CF's C4 register and, for a coefficient that became significant at this
// plane, the cleanup flag taken from the CF. The previous-stripe words of all
// five slots are checked as well.
module tb_ebc_mag_reb;
  import ebc_pkg::*;
  localparam int N = 6;
  localparam int K = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst_n = 1'b0, start = 1'b0, shift = 1'b0;
  logic [3:0][N-1:0]    in_mag = '0;
  logic [3:0]           in_cf = '0;
  logic [N+1:0]         in_prev = '0;
  cf_col_t              cf_c4 = '0;
  logic [4:0][N+1:0]    prev_word;
  logic [3:0][N-1:0]    out_mag;
  logic [3:0]           out_cf;
  logic [N+1:0]         out_prev;

  ebc_mag_reb #(.NPLANES(N), .PLANE(K)) dut (.*);

  logic [3:0][N-1:0] m_mag  [5];
  logic [3:0]        m_cf   [5];
  logic [N+1:0]      m_prev [5];
  int checks = 0, failures = 0, nshift = 0, nnew = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 5; s++) begin m_mag[s] = '0; m_cf[s] = '0; m_prev[s] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      shift   = ($urandom % 3) != 0;
      in_mag  = {4{N'($urandom)}} ^ (4*N)'($urandom);
      in_cf   = 4'($urandom);
      in_prev = (N+2)'($urandom);
      for (int r = 0; r < 4; r++) cf_c4.row[r] = 5'($urandom);
      #1;
      for (int r = 0; r < 4; r++) begin
        logic [N-1:0] em;
        logic         ec;
        pe_reg_t      p;
        p  = cf_c4.row[r];
        em = m_mag[4][r];
        em[K] = p.d & p.v;
        ec = m_cf[4][r];
        if (!p.dh && p.d && p.v) begin ec = p.c; nnew++; end
        checks++;
        if (out_mag[r] != em || out_cf[r] != ec) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d: mag %b/%b cf %b/%b", r, out_mag[r], em, out_cf[r], ec);
        end
      end
      checks++;
      if (out_prev != m_prev[4]) failures++;
      for (int s = 0; s < 5; s++) begin
        checks++;
        if (prev_word[s] != m_prev[s]) failures++;
      end
      @(negedge clk);
      if (shift) begin
        nshift++;
        for (int s = 4; s > 0; s--) begin
          m_mag[s] = m_mag[s-1]; m_cf[s] = m_cf[s-1]; m_prev[s] = m_prev[s-1];
        end
        m_mag[0] = in_mag; m_cf[0] = in_cf; m_prev[0] = in_prev;
      end
    end
    $display("shifts=%0d new significant=%0d", nshift, nnew);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
