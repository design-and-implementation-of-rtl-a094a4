// ebc_pkg: types, constants and table functions shared by the word-level
// EBC (embedded block coding) decoder.
//
// The register contents of a processing element (PE), the column packet that
// moves from the CF of one bit-plane to the next, and the request/response
// bundle between a CF and its four-symbol arithmetic decoder (FAD) are
// defined here. The context-label tables (zero coding, sign coding, magnitude
// refinement) and the MQ probability-state table are the ones of the JPEG 2000
// standard (ISO/IEC 15444-1, Annexes C and D); the word-level design uses them
// unchanged and only reorders when each sample is decoded.
package ebc_pkg;

  // Context labels.
  localparam logic [4:0] CX_RUN = 5'd17;  // run-length context
  localparam logic [4:0] CX_UNI = 5'd18;  // uniform context
  localparam int         NCTX   = 19;     // nineteen contexts

  // Code-block sub-band orientation; selects the zero-coding table.
  typedef enum logic [1:0] {BAND_LL = 2'd0, BAND_HL = 2'd1, BAND_LH = 2'd2, BAND_HH = 2'd3} band_t;

  // Register contents of one current-stripe PE.
  //   sign : decoded sign of the coefficient
  //   dh   : d-hat, the coefficient was significant before this bit-plane
  //   d    : before the visit: first-refinement flag (gamma); after: decoded bit
  //   v    : visited (decoded) in this bit-plane
  //   c    : decoded in the cleanup pass of this bit-plane
  typedef struct packed {
    logic sign;
    logic dh;
    logic d;
    logic v;
    logic c;
  } pe_reg_t;

  // One column of a stripe as held in a CF column slot.
  //   fwd  : the slot holds a column that must be passed on (0: start-up filler)
  //   pad  : flush column after the last real column, nothing to decode
  //   first/last : first or last column of a stripe (masks horizontal neighbours)
  typedef struct packed {
    pe_reg_t [3:0] row;
    logic          first;
    logic          last;
    logic          pad;
    logic          fwd;
  } cf_col_t;

  typedef enum logic [1:0] {REQ_ZCSC = 2'd0, REQ_MR = 2'd1, REQ_RUN = 2'd2} req_kind_t;

  // CF -> FAD: everything needed to decode one sample (up to four symbols).
  typedef struct packed {
    logic            valid;
    req_kind_t       kind;
    logic [1:0]      pass;     // 1, 2 or 3: selects the terminated pass stream
    logic [4:0]      zc_ctx;
    logic [4:0]      mr_ctx;
    logic [1:0]      row;      // row whose sign context is used for REQ_ZCSC
    logic [3:0][4:0] sc_ctx;   // sign context of each row of the column
    logic [3:0]      sc_xor;   // sign prediction of each row
  } fad_req_t;

  // FAD -> CF: the decoded symbols (the signal set of the CF/FSM interface).
  typedef struct packed {
    logic       ack;         // request decoded this cycle
    logic       mag;         // decoded magnitude bit
    logic       sign;        // decoded sign
    logic       sign_valid;  // a sign was decoded
    logic       rlc;         // run-length symbol
    logic [1:0] uniform;     // position of the first one in a broken run
  } fad_rsp_t;

  // MQ probability-state table, Qe / NMPS / NLPS / SWITCH (47 states).
  function automatic logic [15:0] mq_qe(input logic [5:0] i);
    case (i)
      6'd0:  return 16'h5601;  6'd1:  return 16'h3401;  6'd2:  return 16'h1801;
      6'd3:  return 16'h0AC1;  6'd4:  return 16'h0521;  6'd5:  return 16'h0221;
      6'd6:  return 16'h5601;  6'd7:  return 16'h5401;  6'd8:  return 16'h4801;
      6'd9:  return 16'h3801;  6'd10: return 16'h3001;  6'd11: return 16'h2401;
      6'd12: return 16'h1C01;  6'd13: return 16'h1601;  6'd14: return 16'h5601;
      6'd15: return 16'h5401;  6'd16: return 16'h5101;  6'd17: return 16'h4801;
      6'd18: return 16'h3801;  6'd19: return 16'h3401;  6'd20: return 16'h3001;
      6'd21: return 16'h2801;  6'd22: return 16'h2401;  6'd23: return 16'h2201;
      6'd24: return 16'h1C01;  6'd25: return 16'h1801;  6'd26: return 16'h1601;
      6'd27: return 16'h1401;  6'd28: return 16'h1201;  6'd29: return 16'h1101;
      6'd30: return 16'h0AC1;  6'd31: return 16'h09C1;  6'd32: return 16'h08A1;
      6'd33: return 16'h0521;  6'd34: return 16'h0441;  6'd35: return 16'h02A1;
      6'd36: return 16'h0221;  6'd37: return 16'h0141;  6'd38: return 16'h0111;
      6'd39: return 16'h0085;  6'd40: return 16'h0049;  6'd41: return 16'h0025;
      6'd42: return 16'h0015;  6'd43: return 16'h0009;  6'd44: return 16'h0005;
      6'd45: return 16'h0001;  default: return 16'h5601;
    endcase
  endfunction

  function automatic logic [5:0] mq_nmps(input logic [5:0] i);
    if (i == 6'd5)                     return 6'd38;
    else if (i == 6'd13)               return 6'd29;
    else if (i == 6'd45 || i == 6'd46) return i;
    else                               return i + 6'd1;
  endfunction

  function automatic logic [5:0] mq_nlps(input logic [5:0] i);
    case (i)
      6'd0:  return 6'd1;   6'd1:  return 6'd6;   6'd2:  return 6'd9;
      6'd3:  return 6'd12;  6'd4:  return 6'd29;  6'd5:  return 6'd33;
      6'd6:  return 6'd6;   6'd7:  return 6'd14;  6'd8:  return 6'd14;
      6'd9:  return 6'd14;  6'd10: return 6'd17;  6'd11: return 6'd18;
      6'd12: return 6'd20;  6'd13: return 6'd21;  6'd14: return 6'd14;
      6'd15: return 6'd14;  6'd16: return 6'd15;  6'd17: return 6'd16;
      6'd18: return 6'd17;  6'd19: return 6'd18;  6'd20: return 6'd19;
      6'd21: return 6'd19;  6'd46: return 6'd46;
      default: return i - 6'd2;   // states 22..45
    endcase
  endfunction

  function automatic logic mq_switch(input logic [5:0] i);
    return (i == 6'd0) || (i == 6'd6) || (i == 6'd14);
  endfunction

  // Initial state of each context at the start of a coding pass.
  function automatic logic [5:0] mq_init_state(input int cx);
    if (cx == 0)       return 6'd4;
    else if (cx == 17) return 6'd3;
    else if (cx == 18) return 6'd46;
    else               return 6'd0;
  endfunction

  // Zero-coding context from the neighbour significance counts.
  function automatic logic [4:0] zc_context(input logic [1:0] h, input logic [1:0] v,
                                            input logic [2:0] d, input band_t band);
    logic [1:0] hh, vv;
    logic [2:0] hv;
    if (band == BAND_HH) begin
      hv = {1'b0, h} + {1'b0, v};
      if (d >= 3'd3)      return 5'd8;
      else if (d == 3'd2) return (hv >= 3'd1) ? 5'd7 : 5'd6;
      else if (d == 3'd1) return (hv >= 3'd2) ? 5'd5 : (hv == 3'd1) ? 5'd4 : 5'd3;
      else                return (hv >= 3'd2) ? 5'd2 : (hv == 3'd1) ? 5'd1 : 5'd0;
    end
    // HL uses the LL/LH table with horizontal and vertical exchanged.
    hh = (band == BAND_HL) ? v : h;
    vv = (band == BAND_HL) ? h : v;
    if (hh == 2'd2)      return 5'd8;
    else if (hh == 2'd1) return (vv != 2'd0) ? 5'd7 : (d != 3'd0) ? 5'd6 : 5'd5;
    else if (vv == 2'd2) return 5'd4;
    else if (vv == 2'd1) return 5'd3;
    else if (d >= 3'd2)  return 5'd2;
    else if (d == 3'd1)  return 5'd1;
    else                 return 5'd0;
  endfunction

  // Sign-coding context and sign prediction from the horizontal and vertical
  // contributions, each given as {negative, positive} after clamping.
  function automatic logic [5:0] sc_context(input logic [1:0] hc, input logic [1:0] vc);
    // returns {xor_bit, ctx[4:0]}
    // hc/vc: 2'b01 = +1, 2'b10 = -1, 2'b00 = 0
    case ({hc, vc})
      4'b01_01: return {1'b0, 5'd13};
      4'b01_00: return {1'b0, 5'd12};
      4'b01_10: return {1'b0, 5'd11};
      4'b00_01: return {1'b0, 5'd10};
      4'b00_00: return {1'b0, 5'd9};
      4'b00_10: return {1'b1, 5'd10};
      4'b10_01: return {1'b1, 5'd11};
      4'b10_00: return {1'b1, 5'd12};
      default:  return {1'b1, 5'd13};   // 10_10
    endcase
  endfunction

  // Clamped contribution of two neighbours: significance and sign of each.
  function automatic logic [1:0] sc_contrib(input logic s0, input logic n0,
                                            input logic s1, input logic n1);
    logic signed [2:0] sum;
    sum = 3'sd0;
    if (s0) sum = n0 ? sum - 3'sd1 : sum + 3'sd1;
    if (s1) sum = n1 ? sum - 3'sd1 : sum + 3'sd1;
    if (sum > 3'sd0)      return 2'b01;
    else if (sum < 3'sd0) return 2'b10;
    else                  return 2'b00;
  endfunction

  // Magnitude-refinement context.
  function automatic logic [4:0] mr_context(input logic first_ref, input logic any_sig);
    if (!first_ref) return 5'd16;
    return any_sig ? 5'd15 : 5'd14;
  endfunction

endpackage
