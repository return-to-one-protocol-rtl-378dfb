// tb_rto_dr_register: self-checking testbench for the RTO dual-rail register
// at its default width.
//
// Drives the register through complete 4-phase Return-to-One cycles with
// random words:
//   1. reset with random rail values: q must be the all-1s spacer;
//   2. a valid word arrives while req_n is high: q must keep the spacer;
//   3. req_n falls: q must show the word;
//   4. the input returns to the spacer while req_n is still low: q must keep
//      the word;
//   5. req_n rises: q must return to the spacer.
// Reset is also applied in the middle of a cycle. Each of these events is
// counted and a kind that never happened is a failure. The expected values
// come from the binary word drawn for the cycle.
module tb_rto_dr_register;
  import rto_pkg::*;

  localparam int unsigned N = 8;

  logic             rst, req_n;
  dr_t  [N-1:0]     d, q;
  int               checks = 0, failures = 0;
  int               n_reset = 0, n_wait = 0, n_capture = 0, n_keep = 0, n_release = 0;

  rto_dr_register dut (.rst(rst), .req_n(req_n), .d(d), .q(q));

  function automatic logic [2*N-1:0] spacer_word();
    dr_t [N-1:0] w;
    for (int i = 0; i < N; i++) w[i] = RTO_SPACER;
    return w;
  endfunction

  function automatic logic [2*N-1:0] encode_word(input logic [N-1:0] v);
    dr_t [N-1:0] w;
    for (int i = 0; i < N; i++) w[i] = rto_encode(v[i]);
    return w;
  endfunction

  task automatic expect_q(input logic [2*N-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] v;
    rst   = 1'b1;
    req_n = 1'($urandom_range(1, 0));
    d     = (2*N)'($urandom());
    #1;
    expect_q(spacer_word(), "reset with random inputs");
    n_reset++;
    d = spacer_word();
    req_n = 1'b1;
    #1;
    rst = 1'b0;
    #1;
    expect_q(spacer_word(), "after reset release");

    for (int cyc = 0; cyc < 500; cyc++) begin
      v = N'($urandom());
      // Data arrives before the request.
      d = encode_word(v);
      #1;
      expect_q(spacer_word(), "data waiting for request");
      n_wait++;
      req_n = 1'b0;
      #1;
      expect_q(encode_word(v), "capture");
      n_capture++;
      // Input returns to the spacer, request still active.
      d = spacer_word();
      #1;
      expect_q(encode_word(v), "keep word after input spacer");
      n_keep++;
      if (cyc % 50 == 7) begin
        // Reset in the middle of the cycle.
        rst = 1'b1;
        #1;
        expect_q(spacer_word(), "reset mid-cycle");
        n_reset++;
        req_n = 1'b1;
        #1;
        rst = 1'b0;
        #1;
        expect_q(spacer_word(), "after mid-cycle reset");
      end else begin
        req_n = 1'b1;
        #1;
        expect_q(spacer_word(), "return to spacer");
        n_release++;
      end
    end

    checks++;
    if (n_reset < 2 || n_wait == 0 || n_capture == 0 || n_keep == 0 || n_release == 0) begin
      failures++;
      $display("FAIL mechanism never exercised");
    end
    $display("resets=%0d waits=%0d captures=%0d keeps=%0d releases=%0d",
             n_reset, n_wait, n_capture, n_keep, n_release);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
