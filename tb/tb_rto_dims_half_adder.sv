// tb_rto_dims_half_adder: self-checking testbench for the RTO DIMS half adder.
//
// For every operand pair, and with either operand arriving first, it checks:
// the outputs stay at the spacer while only one operand is valid (the
// minterm C-elements wait for both); once both are valid, sum = A xor B and
// carry = A and B appear as valid dual-rail words; the outputs keep that word
// while only one operand has returned to the spacer; and they return to the
// all-1s spacer when both have. The outputs must never show the illegal
// all-0s word. Random pairs follow the directed ones. The expected values
// are computed from the binary operands. rto_channel_monitor instances
// also check that the outputs only alternate between spacer and valid words.
module tb_rto_dims_half_adder;
  import rto_pkg::*;

  dr_t a, b, s, c;
  int  checks = 0, failures = 0;
  int  n_pair[4];
  int  n_wait = 0, n_keep = 0;

  rto_dims_half_adder dut (.a(a), .b(b), .s(s), .c(c));

  // RTO rule on both outputs: spacer and valid words alternate.
  int s_val, s_sp, s_err, c_val, c_sp, c_err;
  rto_channel_monitor #(.NAME("sum"))   u_mon_s (.en(1'b1), .d(s), .n_valid(s_val), .n_spacer(s_sp), .n_errors(s_err));
  rto_channel_monitor #(.NAME("carry")) u_mon_c (.en(1'b1), .d(c), .n_valid(c_val), .n_spacer(c_sp), .n_errors(c_err));

  task automatic expect_sc(input dr_t es, input dr_t ec, input string what);
    checks++;
    if (s !== es || c !== ec) begin
      failures++;
      $display("FAIL %s: a=%b b=%b s=%b c=%b expected s=%b c=%b", what, a, b, s, c, es, ec);
    end
    checks++;
    if (s == RTO_INVALID || c == RTO_INVALID) begin
      failures++;
      $display("FAIL %s: illegal all-0s output word", what);
    end
  endtask

  task automatic one_op(input logic va, input logic vb, input logic a_first,
                        input logic a_leaves_first);
    dr_t es, ec;
    es = rto_encode(va ^ vb);
    ec = rto_encode(va & vb);
    if (a_first) a = rto_encode(va);
    else         b = rto_encode(vb);
    #1;
    expect_sc(RTO_SPACER, RTO_SPACER, "one operand only");
    n_wait++;
    if (a_first) b = rto_encode(vb);
    else         a = rto_encode(va);
    #1;
    expect_sc(es, ec, "evaluate");
    n_pair[{va, vb}]++;
    if (a_leaves_first) a = RTO_SPACER;
    else                b = RTO_SPACER;
    #1;
    expect_sc(es, ec, "one operand returned");
    n_keep++;
    a = RTO_SPACER;
    b = RTO_SPACER;
    #1;
    expect_sc(RTO_SPACER, RTO_SPACER, "return to spacer");
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = RTO_SPACER;
    b = RTO_SPACER;
    #1;
    expect_sc(RTO_SPACER, RTO_SPACER, "idle");
    for (int k = 0; k < 16; k++)
      one_op(k[0], k[1], k[2], k[3]);
    for (int k = 0; k < 1000; k++)
      one_op(1'($urandom()), 1'($urandom()), 1'($urandom()), 1'($urandom()));
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (n_pair[p] == 0) begin
        failures++;
        $display("FAIL operand pair %0d never applied", p);
      end
    end
    #1;
    checks += 2;
    failures += s_err + c_err;
    if (s_val == 0 || c_val == 0 || s_sp == 0 || c_sp == 0) begin
      failures++;
      $display("FAIL an output never completed a spacer/valid cycle");
    end
    $display("sum: %0d valid, %0d spacer, %0d errors; carry: %0d valid, %0d spacer, %0d errors",
             s_val, s_sp, s_err, c_val, c_sp, c_err);
    $display("pairs 00/01/10/11: %0d %0d %0d %0d, waits=%0d keeps=%0d",
             n_pair[0], n_pair[1], n_pair[2], n_pair[3], n_wait, n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
