// tb_lfsr: self-checking test of the LFSR pattern generator.
// Checks the reset value, the first nine patterns of the default
// polynomial from seed 01 (01 03 07 0F 1E 3D 7A F4 E8), that both
// polynomials run through 255 distinct non-all-ones states and return to
// the seed with `done`, that enable low holds the state, and that every
// step matches an independent reference model.
module tb_lfsr;
  logic       clk = 1'b0;
  logic       rst, seed_load, enable, poly_sel, done;
  logic [7:0] seed, q;
  int checks = 0, failures = 0;

  lfsr dut (.clk, .rst, .seed_load, .seed, .enable, .poly_sel, .q, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] ref_next(logic [7:0] s, bit ps);
    // x^8+x^6+x^5+x^4+1 taps q7,q5,q4,q3 ; x^8+x^6+x^5+x^3+1 taps q7,q5,q4,q2
    logic fb;
    if (!ps) fb = ~(s[7] ^ s[5] ^ s[4] ^ s[3]);
    else     fb = ~(s[7] ^ s[5] ^ s[4] ^ s[2]);
    return {s[6:0], fb};
  endfunction

  localparam logic [7:0] FIRST [9] = '{8'h01, 8'h03, 8'h07, 8'h0F, 8'h1E,
                                       8'h3D, 8'h7A, 8'hF4, 8'hE8};

  initial begin
    bit          seen [256];
    logic [7:0]  exp;
    int          period;
    rst = 1'b1; seed_load = 1'b0; enable = 1'b0; poly_sel = 1'b0; seed = 8'h01;
    repeat (2) @(posedge clk);
    #1 check(q == 8'h00, "reset value is zero");
    rst = 1'b0;

    for (int ps = 0; ps < 2; ps++) begin
      poly_sel = ps[0];
      seed_load = 1'b1;
      @(posedge clk); #1 seed_load = 1'b0;
      check(q == 8'h01 && !done, "seed loaded");
      foreach (seen[i]) seen[i] = 1'b0;
      exp = 8'h01;
      period = 0;
      enable = 1'b1;
      for (int n = 0; n < 255; n++) begin
        if (ps == 0 && n < 9) check(q == FIRST[n], $sformatf("pattern %0d = %h", n, q));
        check(!seen[q], $sformatf("state %h repeated at step %0d", q, n));
        check(q != 8'hFF, "lock-up state reached");
        seen[q] = 1'b1;
        @(posedge clk); #1;
        exp = ref_next(exp, ps[0]);
        check(q == exp, $sformatf("step %0d: %h expected %h", n, q, exp));
        period++;
        if (n < 254) check(!done, "done too early");
      end
      check(q == 8'h01 && done, $sformatf("poly %0d: back at seed after %0d", ps, period));
      enable = 1'b0;
      repeat (3) @(posedge clk);
      #1 check(q == 8'h01, "enable low holds the state");
    end

    // a different seed
    poly_sel = 1'b0; seed = 8'h5A; seed_load = 1'b1;
    @(posedge clk); #1 seed_load = 1'b0; enable = 1'b1;
    @(posedge clk); #1 check(q == ref_next(8'h5A, 1'b0), "step from seed 5A");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
