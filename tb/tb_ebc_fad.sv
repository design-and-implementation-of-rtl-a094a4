// tb_ebc_fad: self-checking test of the four-symbol arithmetic decoder.
//
// A random list of sample requests is drawn for each of the three pass
// streams: single symbols with a random context (REQ_MR), magnitude plus sign
// (REQ_ZCSC) and run-length requests with and without a one (REQ_RUN). The
// reference MQ encoder codes exactly the symbols each request should decode,
// one terminated segment per pass. The testbench then issues the requests,
// interleaving the three passes at random, plays the segments into the byte
// inputs (0xFF after the end) and compares every decoded field. It also counts
// cycles in which the decoder stalled for bytes and requests that decoded four
// symbols in one cycle.
module tb_ebc_fad;
  import ebc_pkg::*;
  import tb_ebc_ref_pkg::*;

  localparam int NREQ = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  fad_req_t req;
  fad_rsp_t rsp;
  logic [2:0][7:0] byte_in;
  logic [2:0]      byte_valid;
  logic [2:0]      byte_ready;

  ebc_fad dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Per pass: request list and expected answers.
  fad_req_t     rq   [3][NREQ];
  fad_rsp_t     ex   [3][NREQ];
  byte unsigned seg  [3][$];
  int           ptr  [3];
  int           idx  [3];
  logic         feeding = 1'b0;
  int           n_stall = 0, n_four = 0, n_ff = 0;

  always_ff @(posedge clk)
    for (int q = 0; q < 3; q++) begin
      int np;
      np = ptr[q];
      if (byte_valid[q] && byte_ready[q]) np = np + 1;
      if (start) np = 0;
      ptr[q]     <= np;
      byte_in[q] <= (np < seg[q].size()) ? seg[q][np] : 8'hFF;
    end
  assign byte_valid = {3{feeding & ~start}};

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mq_enc e;
    e = new();
    for (int q = 0; q < 3; q++) begin
      ptr[q] = 0;
      idx[q] = 0;
      e.reset();
      for (int i = 0; i < NREQ; i++) begin
        fad_req_t r;
        fad_rsp_t x;
        int       kind;
        r = '0;
        x = '0;
        r.valid = 1'b1;
        r.pass  = 2'(q + 1);
        for (int j = 0; j < 4; j++) begin
          r.sc_ctx[j] = 5'(9 + $urandom % 5);
          r.sc_xor[j] = 1'($urandom & 1);
        end
        kind = $urandom % 3;
        x.ack = 1'b1;
        if (kind == 0) begin
          r.kind   = REQ_MR;
          r.mr_ctx = 5'($urandom % 17);
          x.mag    = 1'($urandom & 1);
          e.encode(x.mag, int'(r.mr_ctx));
        end else if (kind == 1) begin
          r.kind   = REQ_ZCSC;
          r.zc_ctx = 5'($urandom % 9);
          r.row    = 2'($urandom % 4);
          x.mag    = 1'($urandom & 1);
          e.encode(x.mag, int'(r.zc_ctx));
          if (x.mag) begin
            x.sign       = 1'($urandom & 1);
            x.sign_valid = 1'b1;
            e.encode(x.sign ^ r.sc_xor[r.row], int'(r.sc_ctx[r.row]));
          end
        end else begin
          r.kind = REQ_RUN;
          x.rlc  = ($urandom % 3) == 0;
          e.encode(x.rlc, int'(CX_RUN));
          if (x.rlc) begin
            x.uniform    = 2'($urandom % 4);
            x.mag        = 1'b1;
            x.sign       = 1'($urandom & 1);
            x.sign_valid = 1'b1;
            e.encode(x.uniform[1], int'(CX_UNI));
            e.encode(x.uniform[0], int'(CX_UNI));
            e.encode(x.sign ^ r.sc_xor[x.uniform], int'(r.sc_ctx[x.uniform]));
          end
        end
        rq[q][i] = r;
        ex[q][i] = x;
      end
      e.flush(seg[q]);
      for (int i = 1; i < seg[q].size(); i++) if (seg[q][i-1] == 8'hFF) n_ff++;
    end

    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    feeding = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (idx[0] < NREQ || idx[1] < NREQ || idx[2] < NREQ) begin
      int q;
      do q = $urandom % 3; while (idx[q] >= NREQ);
      req = rq[q][idx[q]];
      #1;
      while (!rsp.ack) begin
        n_stall++;
        @(negedge clk);
      end
      checks++;
      if (rsp.mag != ex[q][idx[q]].mag || rsp.sign_valid != ex[q][idx[q]].sign_valid ||
          (rsp.sign_valid && rsp.sign != ex[q][idx[q]].sign) ||
          (req.kind == REQ_RUN && (rsp.rlc != ex[q][idx[q]].rlc ||
           (rsp.rlc && rsp.uniform != ex[q][idx[q]].uniform)))) begin
        failures++;
        if (failures < 10)
          $display("FAIL pass %0d req %0d kind %0d: got %p expected %p", q + 1, idx[q], req.kind,
                   rsp, ex[q][idx[q]]);
      end
      if (req.kind == REQ_RUN && rsp.rlc) n_four++;
      idx[q]++;
      @(negedge clk);
    end
    req = '0;
    checks++;
    if (n_four == 0 || n_ff == 0) begin
      failures++;
      $display("FAIL coverage: four-symbol requests %0d, stuffed bytes %0d", n_four, n_ff);
    end
    $display("requests=%0d four-symbol=%0d stall cycles=%0d stuffed bytes=%0d", 3 * NREQ,
             n_four, n_stall, n_ff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
