// ebc_mag_reb: magnitude register bank (Mag. REB) of bit-plane k.
//
// The bank travels in step with the CF of the same bit-plane: it has one slot
// per CF column slot (C0..C4) and shifts whenever that CF switches, taking the
// next slot from the bank of plane k+1 (or from the column feeder at the top
// plane). Each slot holds, for the four rows of its column, the magnitude bits
// decoded so far and a flag telling whether the coefficient became significant
// in a cleanup pass, plus the previous-stripe coefficient word that the CF's
// previous-stripe PEs read. When a column leaves the CF, the bank merges the
// bit decoded at plane k (the CF's d register of C4) into magnitude bit k and,
// for a coefficient that became significant at plane k, records the CF's
// cleanup flag. The output slot is valid together with the CF's output column.
// Which data the bank holds and when it merges is this design's choice; the
// architecture names the bank and its place between the CFs.
module ebc_mag_reb
  import ebc_pkg::*;
#(
  parameter int NPLANES = 10,
  parameter int PLANE   = 0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       shift,        // the CF of this plane switches
  input  logic [3:0][NPLANES-1:0]    in_mag,
  input  logic [3:0]                 in_cf,
  input  logic [NPLANES+1:0]         in_prev,
  input  cf_col_t                    cf_c4,        // CF slot C4, plane-k state
  output logic [4:0][NPLANES+1:0]    prev_word,    // to the CF's PE 2 row
  output logic [3:0][NPLANES-1:0]    out_mag,
  output logic [3:0]                 out_cf,
  output logic [NPLANES+1:0]         out_prev
);
  logic [3:0][NPLANES-1:0] mag  [5];
  logic [3:0]              cfl  [5];
  logic [NPLANES+1:0]      prev [5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 5; s++) begin mag[s] <= '0; cfl[s] <= '0; prev[s] <= '0; end
    end else if (start) begin
      for (int s = 0; s < 5; s++) begin mag[s] <= '0; cfl[s] <= '0; prev[s] <= '0; end
    end else if (shift) begin
      for (int s = 1; s < 5; s++) begin
        mag[s]  <= mag[s-1];
        cfl[s]  <= cfl[s-1];
        prev[s] <= prev[s-1];
      end
      mag[0]  <= in_mag;
      cfl[0]  <= in_cf;
      prev[0] <= in_prev;
    end
  end

  always_comb begin
    for (int s = 0; s < 5; s++) prev_word[s] = prev[s];
    out_prev = prev[4];
    for (int r = 0; r < 4; r++) begin
      out_mag[r]        = mag[4][r];
      out_mag[r][PLANE] = cf_c4.row[r].d & cf_c4.row[r].v;
      out_cf[r]         = cfl[4][r];
      if (!cf_c4.row[r].dh && cf_c4.row[r].d && cf_c4.row[r].v) out_cf[r] = cf_c4.row[r].c;
    end
  end

endmodule
