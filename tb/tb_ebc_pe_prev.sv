// tb_ebc_pe_prev: test of the previous-stripe PE at three bit-planes.
//
// Random coefficient words {cf, sign, magnitude} are applied to PEs of planes
// 0, 4 and 9 of a ten-plane decoder. Expected: significant at plane k when
// the magnitude is at least 2^k; for the first two passes a coefficient whose
// highest one is bit k and that became significant in a cleanup pass does
// not count yet.
module tb_ebc_pe_prev;
  localparam int N = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N+1:0] word;
  logic [2:0]   phi, phi_mr, sign;

  ebc_pe_prev #(.NPLANES(N), .PLANE(0)) u0 (.word, .phi(phi[0]), .phi_mr(phi_mr[0]), .sign(sign[0]));
  ebc_pe_prev #(.NPLANES(N), .PLANE(4)) u4 (.word, .phi(phi[1]), .phi_mr(phi_mr[1]), .sign(sign[1]));
  ebc_pe_prev #(.NPLANES(N), .PLANE(9)) u9 (.word, .phi(phi[2]), .phi_mr(phi_mr[2]), .sign(sign[2]));

  int checks = 0, failures = 0;
  int planes [3] = '{0, 4, 9};

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int unsigned mag;
      bit cf, sg;
      // Favour small magnitudes so that each plane sees both cases.
      mag  = $urandom % (1 << ($urandom % (N + 1)));
      cf   = 1'($urandom & 1);
      sg   = 1'($urandom & 1);
      word = {cf, sg, N'(mag)};
      @(negedge clk);
      for (int j = 0; j < 3; j++) begin
        bit e_phi, e_mr, top_here;
        e_phi    = (mag >> planes[j]) != 0;
        top_here = (mag >> planes[j]) == 1;
        e_mr     = e_phi && !(top_here && cf);
        checks++;
        if (phi[j] != e_phi || phi_mr[j] != e_mr || sign[j] != sg) begin
          failures++;
          if (failures < 10)
            $display("FAIL plane %0d word %h: phi %b/%b phi_mr %b/%b", planes[j], word,
                     phi[j], e_phi, phi_mr[j], e_mr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
