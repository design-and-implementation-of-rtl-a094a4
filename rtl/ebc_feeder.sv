// ebc_feeder: column feeder and sequencing control of a code-block.
//
// The decoder works on an "empty" code-block that is shifted column by column
// into the CF of the top bit-plane; the decoded coefficients come out of the
// bit-plane 0 stage. The feeder produces that column sequence: the W columns
// of stripe 0, then of stripe 1, and so on (H/4 stripes), each marked first or
// last column of its stripe, followed by NPAD flush columns that push the last
// real columns through every CF. With every column it sends the previous-stripe
// coefficient word from the line buffer (zero for stripe 0).
//
// A column of stripe s > 0 is offered only after the same column of stripe s-1
// has left the decoder (counted by col_done), so the line-buffer word is
// final; with W larger than the number of columns the CF chain can hold
// (5 per bit-plane) this never stalls. Handshake: valid/take, one column per
// take. start begins a code-block; done rises when every real column has left.
// This sequencing is this design's own choice within the architecture.
// rst_n also disables the assertions below, so lint reports it as used both
// synchronously and asynchronously; that is intended.
module ebc_feeder
  import ebc_pkg::*;
#(
  parameter int NPLANES = 10,
  parameter int CB_W    = 64,
  parameter int CB_H    = 64,
  parameter int NPAD    = 5 * NPLANES + 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      take,
  input  logic                      col_done,    // a real column left the decoder
  output cf_col_t                   col,
  output logic [NPLANES+1:0]        prev,
  output logic                      valid,
  output logic [$clog2(CB_W)-1:0]   lb_raddr,
  input  logic [NPLANES+1:0]        lb_rdata,
  output logic                      done
);
  localparam int NSTRIPE = CB_H / 4;
  localparam int NCOL    = CB_W * NSTRIPE;
  localparam int CW      = $clog2(NCOL + NPAD + 1);

  logic          running;
  logic [CW-1:0] issued;      // columns offered and taken (real and pad)
  logic [CW-1:0] finished;    // real columns that left the decoder
  logic [$clog2(CB_W)-1:0]    x;
  logic [$clog2(NSTRIPE+1)-1:0] s;
  logic          in_pad;

  assign in_pad   = issued >= CW'(NCOL);
  assign lb_raddr = x;

  always_comb begin
    col       = '0;
    col.fwd   = 1'b1;
    col.pad   = in_pad;
    col.first = in_pad | (x == '0);
    col.last  = in_pad | (x == ($clog2(CB_W))'(CB_W - 1));
    prev      = (in_pad || s == '0) ? '0 : lb_rdata;
    valid     = running && (issued < CW'(NCOL + NPAD)) &&
                (in_pad || s == '0 || finished + CW'(CB_W) > issued);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      issued   <= '0;
      finished <= '0;
      x        <= '0;
      s        <= '0;
      done     <= 1'b0;
    end else if (start) begin
      running  <= 1'b1;
      issued   <= '0;
      finished <= '0;
      x        <= '0;
      s        <= '0;
      done     <= 1'b0;
    end else begin
      if (take && valid) begin
        issued <= issued + CW'(1);
        if (!in_pad) begin
          if (x == ($clog2(CB_W))'(CB_W - 1)) begin
            x <= '0;
            s <= s + 1'b1;
          end else begin
            x <= x + 1'b1;
          end
        end
      end
      if (col_done) begin
        finished <= finished + CW'(1);
        if (finished + CW'(1) == CW'(NCOL)) begin
          done    <= 1'b1;
          running <= 1'b0;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) take |-> valid);
endmodule
