// tb_qca_approx_top -- end-to-end self-check of the whole gate library.
//
// 1000 random vectors drive all units of the top at once, so that any
// cross-wiring between units shows up. Expected values are worked out here
// from integer arithmetic:
//   * 4-2 compressor: stage 1 takes a, b, c; its approximate sum is the
//     parity except that 0 or 3 ones invert it, its carry is "two or more";
//     stage 2 does the same on (stage-1 sum, d, cin);
//   * XOR3: parity, inverted for 000 and 111;  XOR5: three or more ones;
//   * AND / OR: from the integer value of {g_a, g_b}.
// The testbench counts how often each approximation actually bites, i.e. an
// output differs from the exact function (compressor sum, carry and cout;
// XOR3; XOR5), and counts a failure for any of those that never occurred.
// The same vectors are then applied exhaustively in order to confirm the
// error rates: 12/16/12 of 32 for the compressor, 2 of 8 for XOR3 and
// 10 of 32 for XOR5. The top has no parameters, so this run is full size.
module tb_qca_approx_top;
  logic       cmp_a, cmp_b, cmp_c, cmp_d, cmp_cin;
  logic       cmp_sum, cmp_carry, cmp_cout;
  logic [2:0] x3_in;
  logic       x3_y;
  logic [4:0] x5_in;
  logic       x5_y;
  logic       g_a, g_b, and_y, or_y;

  int checks = 0, failures = 0;
  int n_sum_err = 0, n_carry_err = 0, n_cout_err = 0, n_x3_err = 0, n_x5_err = 0;

  qca_approx_top dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic approx_sum3(input int ones);
    return (ones == 0) ? 1'b1 : (ones == 3) ? 1'b0 : ones[0];
  endfunction

  function automatic int ones_of(input logic [4:0] v);
    int n = 0;
    for (int i = 0; i < 5; i++) n += int'(v[i]);
    return n;
  endfunction

  // Check the current outputs; with 'tally' set, also count approximation
  // events for the final error-rate check.
  task automatic check_all(input bit tally);
    int   n1, n2, n5, nall;
    logic s1, co, want_sum, want_carry, ex_cout, ex_carry;
    logic want_x3, want_x5;
    #1;
    n1         = int'(cmp_a) + int'(cmp_b) + int'(cmp_c);
    s1         = approx_sum3(n1);
    co         = (n1 >= 2);
    n2         = int'(s1) + int'(cmp_d) + int'(cmp_cin);
    want_sum   = approx_sum3(n2);
    want_carry = (n2 >= 2);
    checks += 3;
    if (cmp_sum !== want_sum || cmp_carry !== want_carry || cmp_cout !== co) begin
      failures++;
      $display("FAIL cmp in=%b%b%b%b%b out=%b%b%b want %b%b%b", cmp_a, cmp_b, cmp_c,
               cmp_d, cmp_cin, cmp_sum, cmp_carry, cmp_cout, want_sum, want_carry, co);
    end
    nall     = n1 + int'(cmp_d) + int'(cmp_cin);
    ex_cout  = (int'(cmp_c) + int'(cmp_d) + int'(cmp_cin)) >= 2;
    ex_carry = ((nall >> 1) - int'(ex_cout)) != 0;

    want_x3 = approx_sum3(ones_of({2'b00, x3_in}));
    checks++;
    if (x3_y !== want_x3) begin
      failures++;
      $display("FAIL xor3 in=%b y=%b", x3_in, x3_y);
    end

    n5      = ones_of(x5_in);
    want_x5 = (n5 >= 3);
    checks++;
    if (x5_y !== want_x5) begin
      failures++;
      $display("FAIL xor5 in=%b y=%b", x5_in, x5_y);
    end

    checks += 2;
    if (and_y !== (g_a && g_b) || or_y !== (g_a || g_b)) begin
      failures++;
      $display("FAIL gates a=%b b=%b and=%b or=%b", g_a, g_b, and_y, or_y);
    end

    if (tally) begin
      if (cmp_sum   != nall[0])  n_sum_err++;
      if (cmp_carry != ex_carry) n_carry_err++;
      if (cmp_cout  != ex_cout)  n_cout_err++;
      if (x3_y      != ^x3_in)   n_x3_err++;
      if (x5_y      != ^x5_in)   n_x5_err++;
    end
  endtask

  initial begin
    int r_sum, r_carry, r_cout, r_x3, r_x5;
    // Random phase: all units at once.
    for (int i = 0; i < 1000; i++) begin
      {cmp_a, cmp_b, cmp_c, cmp_d, cmp_cin} = 5'($urandom);
      x3_in      = 3'($urandom);
      x5_in      = 5'($urandom);
      {g_a, g_b} = 2'($urandom);
      check_all(1'b1);
    end
    checks += 5;
    if (n_sum_err == 0)   begin failures++; $display("FAIL compressor sum error never seen");   end
    if (n_carry_err == 0) begin failures++; $display("FAIL compressor carry error never seen"); end
    if (n_cout_err == 0)  begin failures++; $display("FAIL compressor cout error never seen");  end
    if (n_x3_err == 0)    begin failures++; $display("FAIL xor3 error never seen");             end
    if (n_x5_err == 0)    begin failures++; $display("FAIL xor5 error never seen");             end
    $display("random phase events: sum %0d carry %0d cout %0d xor3 %0d xor5 %0d (of 1000)",
             n_sum_err, n_carry_err, n_cout_err, n_x3_err, n_x5_err);

    // Exhaustive phase: error rates over all input patterns.
    n_sum_err = 0; n_carry_err = 0; n_cout_err = 0; n_x3_err = 0; n_x5_err = 0;
    for (int v = 0; v < 32; v++) begin
      {cmp_a, cmp_b, cmp_c, cmp_d, cmp_cin} = 5'(v);
      x3_in      = 3'(v);
      x5_in      = 5'(v);
      {g_a, g_b} = 2'(v);
      check_all(1'b1);
    end
    // x3_in and the gates repeat every 8 and 4 patterns; XOR3 errors scale by 4.
    r_sum = n_sum_err; r_carry = n_carry_err; r_cout = n_cout_err;
    r_x3 = n_x3_err; r_x5 = n_x5_err;
    checks += 5;
    if (r_sum != 12)   begin failures++; $display("FAIL sum error rate %0d/32", r_sum);     end
    if (r_carry != 16) begin failures++; $display("FAIL carry error rate %0d/32", r_carry); end
    if (r_cout != 12)  begin failures++; $display("FAIL cout error rate %0d/32", r_cout);   end
    if (r_x3 != 8)     begin failures++; $display("FAIL xor3 error rate %0d/32", r_x3);     end
    if (r_x5 != 10)    begin failures++; $display("FAIL xor5 error rate %0d/32", r_x5);     end
    $display("error rates: sum %0d/32 carry %0d/32 cout %0d/32 xor3 %0d/8 xor5 %0d/32",
             r_sum, r_carry, r_cout, r_x3 / 4, r_x5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
