// tb_rto_ha_stage: end-to-end testbench of the RTO half-adder pipeline stage,
// at its default configuration.
//
// The testbench plays the environment of the stage: it offers operands,
// drives both active-low requests and consumes the result, following the
// 4-phase Return-to-One order
//   operands valid -> req_in_n low -> req_out_n low -> operands spacer ->
//   req_in_n high -> req_out_n high.
// The order in which operands and requests change is varied at random
// (request before or after the data, output request before or after the
// adder has finished), and every intermediate point is checked against
// values worked out from the binary operands. It counts the mechanisms of the
// stage and fails if one never happened:
//   reset to spacer (at start and in the middle of an operation),
//   input register waiting for its request with data present,
//   output register waiting for its request with a result present,
//   input register holding its word after the operands returned to spacer,
//   output register holding its result after the adder returned to spacer,
//   each of the four operand pairs (one per DIMS minterm),
//   all wires back at the spacer after an operation.
// rto_channel_monitor instances check the RTO rule (spacer and valid words
// alternate, never all-0s) on the registered operands and the registered
// result throughout the run.
module tb_rto_ha_stage;
  import rto_pkg::*;

  logic rst, req_in_n, req_out_n;
  dr_t  a, b, a_q, b_q, s, c;
  int   checks = 0, failures = 0;
  int   n_reset = 0, n_in_wait = 0, n_out_wait = 0, n_in_keep = 0, n_out_keep = 0;
  int   n_idle = 0, n_ops = 0;
  int   n_pair[4];

  // RTO protocol monitors on the registered operands and the registered
  // result.
  localparam int NMON = 4;
  dr_t  mon_d   [NMON];
  int   mon_val [NMON];
  int   mon_sp  [NMON];
  int   mon_err [NMON];

  assign mon_d[0] = a_q;
  assign mon_d[1] = b_q;
  assign mon_d[2] = s;
  assign mon_d[3] = c;

  for (genvar m = 0; m < NMON; m++) begin : g_mon
    rto_channel_monitor #(.NAME($sformatf("channel %0d", m))) u_mon (
      .en(!rst), .d(mon_d[m]),
      .n_valid(mon_val[m]), .n_spacer(mon_sp[m]), .n_errors(mon_err[m])
    );
  end

  rto_ha_stage dut (
    .rst(rst), .req_in_n(req_in_n), .req_out_n(req_out_n),
    .a(a), .b(b), .a_q(a_q), .b_q(b_q), .s(s), .c(c)
  );

  task automatic expect_all(input dr_t ea, input dr_t eb, input dr_t es, input dr_t ec,
                            input string what);
    checks++;
    if (a_q !== ea || b_q !== eb || s !== es || c !== ec) begin
      failures++;
      $display("FAIL %s: a_q=%b b_q=%b s=%b c=%b expected %b %b %b %b",
               what, a_q, b_q, s, c, ea, eb, es, ec);
    end
  endtask

  task automatic expect_idle(input string what);
    expect_all(RTO_SPACER, RTO_SPACER, RTO_SPACER, RTO_SPACER, what);
  endtask

  task automatic do_reset();
    rst = 1'b1;
    #1;
    expect_idle("reset");
    n_reset++;
    a = RTO_SPACER;
    b = RTO_SPACER;
    req_in_n  = 1'b1;
    req_out_n = 1'b1;
    #1;
    rst = 1'b0;
    #1;
    expect_idle("after reset");
  endtask

  // One operation; abort_at > 0 applies reset at that step instead of
  // finishing normally.
  task automatic one_op(input logic va, input logic vb, input int abort_at);
    dr_t ea, eb, es, ec;
    ea = rto_encode(va);
    eb = rto_encode(vb);
    es = rto_encode(va ^ vb);
    ec = rto_encode(va & vb);

    if ($urandom_range(1, 0) == 1) begin
      // Data first: the input register waits for its request.
      a = ea;
      b = eb;
      #1;
      expect_idle("operands waiting for req_in_n");
      n_in_wait++;
      req_in_n = 1'b0;
    end else begin
      // Request first: the register passes each operand as it arrives.
      req_in_n = 1'b0;
      #1;
      a = ea;
      #1;
      expect_all(ea, RTO_SPACER, RTO_SPACER, RTO_SPACER, "only A captured");
      b = eb;
    end
    #1;
    expect_all(ea, eb, RTO_SPACER, RTO_SPACER, "result waiting for req_out_n");
    n_out_wait++;
    if (abort_at == 1) begin do_reset(); return; end

    req_out_n = 1'b0;
    #1;
    expect_all(ea, eb, es, ec, "result captured");
    n_pair[{va, vb}]++;

    a = RTO_SPACER;
    b = RTO_SPACER;
    #1;
    expect_all(ea, eb, es, ec, "input register keeps operands");
    n_in_keep++;
    if (abort_at == 2) begin do_reset(); return; end

    req_in_n = 1'b1;
    #1;
    expect_all(RTO_SPACER, RTO_SPACER, es, ec, "output register keeps result");
    n_out_keep++;

    req_out_n = 1'b1;
    #1;
    expect_idle("stage back at spacer");
    n_idle++;
    n_ops++;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = dr_t'($urandom());
    b = dr_t'($urandom());
    req_in_n  = 1'($urandom());
    req_out_n = 1'($urandom());
    do_reset();
    for (int k = 0; k < 4; k++) one_op(k[1], k[0], 0);
    one_op(1'b1, 1'b0, 1);
    one_op(1'b1, 1'b1, 2);
    for (int k = 0; k < 1000; k++)
      one_op(1'($urandom()), 1'($urandom()), ($urandom_range(99, 0) == 0) ? 2 : 0);

    checks++;
    if (n_reset < 3 || n_in_wait == 0 || n_out_wait == 0 || n_in_keep == 0 ||
        n_out_keep == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL a stage mechanism never happened");
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (n_pair[p] == 0) begin
        failures++;
        $display("FAIL operand pair %0d never computed", p);
      end
    end
    #1;
    for (int m = 0; m < NMON; m++) begin
      checks++;
      failures += mon_err[m];
      if (mon_val[m] == 0 || mon_sp[m] == 0) begin
        failures++;
        $display("FAIL channel %0d never carried a full spacer/valid cycle", m);
      end
      $display("channel %0d: %0d valid words, %0d spacers, %0d protocol errors",
               m, mon_val[m], mon_sp[m], mon_err[m]);
    end
    $display("ops=%0d resets=%0d in_wait=%0d out_wait=%0d in_keep=%0d out_keep=%0d idle=%0d",
             n_ops, n_reset, n_in_wait, n_out_wait, n_in_keep, n_out_keep, n_idle);
    $display("pairs 00/01/10/11: %0d %0d %0d %0d", n_pair[0], n_pair[1], n_pair[2], n_pair[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
