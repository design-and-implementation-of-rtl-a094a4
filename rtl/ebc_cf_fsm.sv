// ebc_cf_fsm: column-switching scan controller of one context-formation unit.
//
// The CF holds columns in slots C4 (oldest, leftmost) .. C0 (newest). The scan
// alternates between a significance-propagation ("Pass 1") sub-scan of one
// column and a refinement/cleanup ("non-Pass 1") sub-scan of the column to its
// left, so that the Pass 1 scan always runs one column ahead. Four states:
//   P1_C1  : Pass 1 scan of C1         NP1_C2 : non-Pass 1 scan of C2
//   P1_C2  : Pass 1 scan of C2         NP1_C3 : non-Pass 1 scan of C3
// Transitions (condition numbers as in the state diagram of the design):
//   P1_C1 : cond 2 stay; cond 1 -> NP1_C2; cond 0 (four Pass 1 samples) -> switch, NP1_C3
//   NP1_C2: cond 3 stay; cond 4 -> switch, P1_C1
//   NP1_C3: cond 3 stay; cond 4 -> switch, P1_C2
//   P1_C2 : cond 2 stay; cond 1 -> P1_C1;  cond 0 -> switch, P1_C2
// "switch" shifts every column one slot left and takes a new column into C0.
//
// Each cycle the controller picks the next sample of the current sub-scan:
// the first row at or below the row pointer that is Pass 1 eligible (Pass 1
// scan) or not yet visited (non-Pass 1 scan). A sub-scan that has nothing left
// is left in the same cycle (conditions 1 and 4 are evaluated before the
// decode, up to three hops), so a sample is decoded every cycle in which the
// decoder acknowledges. When a sub-scan ends on an empty column the controller
// switches without decoding (a bubble). When the switch cannot be made yet
// (no new column from the upper bit-plane, or C4 not yet taken by the lower
// one) the switch is held pending and no sample is decoded.
//
// Interface: p1_elig/unvis give, for slots C1..C3 (index 1..3), the rows that
// may be decoded; sel_* name the chosen sample; done_row is the last row the
// decode covered (a run-length decode may cover several); ack says the decoder
// decoded it. do_switch is the switch strobe. The row and state choices are
// this design's reading of the state diagram; the diagram fixes only the
// states, the conditions and the switch flags.
// rst_n also disables the assertions below, so lint reports it as used both
// synchronously and asynchronously; that is intended.
module ebc_cf_fsm (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,        // new code-block: back to P1_C1
  input  logic [2:1][3:0]  p1_elig,    // Pass 1 sub-scans run on C1 and C2 only
  input  logic [3:1][3:0]  unvis,
  input  logic             ack,
  input  logic [1:0]       done_row,
  input  logic             can_switch,
  output logic             sel_valid,
  output logic [1:0]       sel_col,      // 1..3
  output logic [1:0]       sel_row,
  output logic             sel_p1,       // selected sample is in a Pass 1 sub-scan
  output logic             do_switch,
  output logic             bubble,       // switch without a decode
  output logic [1:0]       state_o
);
  typedef enum logic [1:0] {P1_C1 = 2'd0, NP1_C2 = 2'd1, P1_C2 = 2'd2, NP1_C3 = 2'd3} st_t;

  st_t        st, st_n;
  logic [2:0] ptr, ptr_n;
  logic       pend, pend_n;      // switch pending
  st_t        pend_st, pend_st_n;

  // First set bit of m at or after position p.
  function automatic logic [2:0] first_from(input logic [3:0] m, input logic [2:0] p);
    for (int i = 0; i < 4; i++)
      if (m[i] && (3'(i) >= p)) return 3'(i);
    return 3'd4;
  endfunction

  st_t        s;
  logic [2:0] p;
  logic [2:0] r;
  logic       empty_sw;    // the resolved sub-scan is empty: switch
  st_t        empty_st;
  logic       want_sw;
  st_t        sw_st;
  logic [3:0] left;

  // Sample selection; does not depend on the decoder's answer.
  always_comb begin
    s         = st;
    p         = ptr;
    r         = 3'd4;
    sel_valid = 1'b0;
    sel_col   = 2'd1;
    sel_p1    = 1'b0;
    empty_sw  = 1'b0;
    empty_st  = P1_C1;
    if (!pend) begin
      // Resolve sub-scans that have nothing left (conditions 1 and 4).
      for (int hop = 0; hop < 3; hop++) begin
        if (!sel_valid && !empty_sw) begin
          case (s)
            P1_C1: begin
              r = first_from(p1_elig[1], p);
              if (r != 3'd4) begin sel_valid = 1'b1; sel_col = 2'd1; sel_p1 = 1'b1; end
              else begin s = NP1_C2; p = 3'd0; end
            end
            P1_C2: begin
              r = first_from(p1_elig[2], p);
              if (r != 3'd4) begin sel_valid = 1'b1; sel_col = 2'd2; sel_p1 = 1'b1; end
              else begin s = P1_C1; p = 3'd0; end
            end
            NP1_C2: begin
              r = first_from(unvis[2], p);
              if (r != 3'd4) begin sel_valid = 1'b1; sel_col = 2'd2; end
              else begin empty_sw = 1'b1; empty_st = P1_C1; end
            end
            default: begin // NP1_C3
              r = first_from(unvis[3], p);
              if (r != 3'd4) begin sel_valid = 1'b1; sel_col = 2'd3; end
              else begin empty_sw = 1'b1; empty_st = P1_C2; end
            end
          endcase
        end
      end
    end
    sel_row = r[1:0];
  end

  // Next state.
  always_comb begin
    want_sw   = 1'b0;
    sw_st     = P1_C1;
    bubble    = 1'b0;
    st_n      = st;
    ptr_n     = ptr;
    pend_n    = pend;
    pend_st_n = pend_st;
    do_switch = 1'b0;
    left      = 4'd0;
    if (pend) begin
      do_switch = can_switch;
      if (can_switch) begin
        pend_n = 1'b0;
        st_n   = pend_st;
        ptr_n  = 3'd0;
      end
    end else begin
      if (empty_sw) begin
        // Empty sub-scan: switch without a decode.
        bubble    = 1'b1;
        do_switch = can_switch;
        if (can_switch) begin st_n = empty_st; ptr_n = 3'd0; end
        else begin pend_n = 1'b1; pend_st_n = empty_st; end
      end else if (sel_valid && ack) begin
        if (sel_p1) begin
          // Rows of this column still open after this decode.
          left = (sel_col == 2'd1) ? unvis[1] : unvis[2];
          left[sel_row] = 1'b0;
          if (left == 4'd0) begin
            // Condition 0: the column held four Pass 1 samples.
            want_sw = 1'b1;
            sw_st   = (s == P1_C1) ? NP1_C3 : P1_C2;
          end else begin
            st_n  = s;                     // condition 2 (or 1 next cycle)
            ptr_n = r + 3'd1;
          end
        end else begin
          left = (sel_col == 2'd2) ? unvis[2] : unvis[3];
          for (int i = 0; i < 4; i++) if (2'(i) <= done_row) left[i] = 1'b0;
          if (left == 4'd0) begin
            want_sw = 1'b1;                // condition 4
            sw_st   = (s == NP1_C2) ? P1_C1 : P1_C2;
          end else begin
            st_n  = s;                     // condition 3
            ptr_n = {1'b0, done_row} + 3'd1;
          end
        end
        if (want_sw) begin
          do_switch = can_switch;
          if (can_switch) begin st_n = sw_st; ptr_n = 3'd0; end
          else begin pend_n = 1'b1; pend_st_n = sw_st; end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= P1_C1;
      ptr     <= 3'd0;
      pend    <= 1'b0;
      pend_st <= P1_C1;
    end else if (start) begin
      st      <= P1_C1;
      ptr     <= 3'd0;
      pend    <= 1'b0;
      pend_st <= P1_C1;
    end else begin
      st      <= st_n;
      ptr     <= ptr_n;
      pend    <= pend_n;
      pend_st <= pend_st_n;
    end
  end

  assign state_o = st;

  // A switch is only issued when it can be carried out.
  assert property (@(posedge clk) disable iff (!rst_n) do_switch |-> can_switch);
  // A decode and a bubble never coincide.
  assert property (@(posedge clk) disable iff (!rst_n) !(bubble && sel_valid));

endmodule
