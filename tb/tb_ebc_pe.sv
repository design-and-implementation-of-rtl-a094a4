// tb_ebc_pe: exhaustive test of the current-stripe PE state evaluation.
//
// All 32 register values (sign, d-hat, d, v, c) are applied. The expected
// outputs are worked out from the meaning of the state bits: a sample counts
// as significant once it was significant at a higher plane or has been
// decoded as a one here; refinement passes ignore ones found by this plane's
// cleanup pass; the first-refinement flag is the (1,1,0) code; the state
// handed to the next lower plane marks every one so far as "significant
// before" and keeps "first refinement pending" only for a new one.
module tb_ebc_pe;
  import ebc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  pe_reg_t r;
  logic    phi, phi_mr, gamma;
  pe_reg_t nxt;

  ebc_pe dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      bit sg, dh, d, v, c;
      bit e_phi, e_phi_mr, e_gamma, new_one;
      {sg, dh, d, v, c} = 5'(i);
      r = '{sign: sg, dh: dh, d: d, v: v, c: c};
      @(negedge clk);
      new_one  = !dh && d && v;                 // a one decoded at this plane
      e_phi    = dh || new_one;
      e_phi_mr = dh || (new_one && !c);
      e_gamma  = dh && d && !v;
      checks += 5;
      if (phi != e_phi) begin failures++; $display("FAIL phi for %05b", i); end
      if (phi_mr != e_phi_mr) begin failures++; $display("FAIL phi_mr for %05b", i); end
      if (gamma != e_gamma) begin failures++; $display("FAIL gamma for %05b", i); end
      if (nxt.sign != sg || nxt.v || nxt.c) begin
        failures++; $display("FAIL nxt sign/v/c for %05b", i);
      end
      // Next plane: d-hat = significant before or became significant now
      // (d set either as a pending first refinement or as a decoded one).
      if (nxt.dh != (dh || d) || nxt.d != (!dh && d)) begin
        failures++; $display("FAIL nxt dh/d for %05b: %p", i, nxt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
