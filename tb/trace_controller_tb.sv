// trace_controller_tb: self-checking test of the trace controller.
//
// Three instances:
//   * default M = 4, N = 32, equal relevance;
//   * M = 2, N = 2, equal relevance: the two-region table (only R_A active ->
//     A0, A1; only R_B -> B0, B1; both -> A0, B0);
//   * M = 3, N = 6 with relevance weights 1, 2, 3, whose shares were worked
//     out by hand (e.g. regions 0 and 2 active: 6*1/4 = 1.5 and 6*3/4 = 4.5,
//     the spare slot goes to the lower index on the tied remainder -> 2, 4).
// For every knob value the TB checks alloc against its own shares, decodes
// every select code back to (region, priority) and checks that the traced
// set is exactly the best C_i signals of each region, each once, with a
// region's first N/M signals on its home multiplexers. It also checks the
// one-cycle latency from knob to outputs and the reset state.
module trace_controller_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---- default instance ----
  logic [3:0]        a_knob, a_state;
  logic [31:0][6:0]  a_sel;
  logic [3:0][5:0]   a_alloc;
  trace_controller dut_a (.clk, .rst_n, .active_regions(a_knob), .state(a_state),
                          .sel(a_sel), .alloc(a_alloc));
  // ---- M = 2, N = 2 ----
  logic [1:0]        b_knob, b_state;
  logic [1:0][0:0]   b_sel;
  logic [1:0][1:0]   b_alloc;
  trace_controller #(.M(2), .N(2)) dut_b (.clk, .rst_n, .active_regions(b_knob),
                          .state(b_state), .sel(b_sel), .alloc(b_alloc));
  // ---- M = 3, N = 6, weights 1, 2, 3 ----
  logic [2:0]        c_knob, c_state;
  logic [5:0][3:0]   c_sel;
  logic [2:0][2:0]   c_alloc;
  trace_controller #(.M(3), .N(6), .RELEVANCE({8'd3, 8'd2, 8'd1})) dut_c (.clk, .rst_n,
                          .active_regions(c_knob), .state(c_state), .sel(c_sel), .alloc(c_alloc));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Equal relevance: N/k each, the first N%k active regions one more.
  function automatic void equal_share(input int m, input int n, input int st, output int c[]);
    int act = (st == 0) ? (1 << m) - 1 : st;
    int k = $countones(act), seen = 0;
    c = new[m];
    for (int i = 0; i < m; i++) begin
      c[i] = 0;
      if (act[i]) begin
        c[i] = n / k + ((seen < n % k) ? 1 : 0);
        seen++;
      end
    end
  endfunction

  // Decode selects and compare with the required set of signals.
  function automatic int sel_errors(input int m, input int n, input int sel[], input int c[]);
    int h = n / m, rem = n - n / m, nin = 1 + (m - 1) * (n - n / m);
    int errs = 0;
    int used[int];
    for (int k = 0; k < n; k++) begin
      int i, p;
      if (sel[k] >= nin) begin
        errs++;
        continue;
      end
      if (sel[k] == 0) begin
        i = k / h;
        p = k % h;
      end else begin
        int r = (sel[k] - 1) / rem;
        i = (r < k / h) ? r : r + 1;
        p = h + (sel[k] - 1) % rem;
        if (p < h || c[k / h] > k % h) errs++;  // home slot must stay home
      end
      if (p >= c[i] || used.exists(i * n + p)) errs++;
      used[i * n + p] = 1;
    end
    if (used.size() != n) errs++;
    return errs;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c[], s[];
    automatic int hand_c [8][3] = '{'{1,2,3}, '{6,0,0}, '{0,6,0}, '{2,4,0},
                          '{0,0,6}, '{2,0,4}, '{0,2,4}, '{1,2,3}};
    a_knob = 4'b0001; b_knob = 2'b01; c_knob = 3'b001;
    repeat (2) @(posedge clk);
    @(negedge clk);
    chk(a_state == 4'hf && b_state == 2'b11 && c_state == 3'b111, "reset state all active");
    chk(a_alloc == {6'd8, 6'd8, 6'd8, 6'd8}, "reset alloc 8 each");
    rst_n = 1'b1;

    for (int st = 0; st < 16; st++) begin
      a_knob = 4'(st);
      b_knob = 2'(st);
      c_knob = 3'(st);
      #1;
      if (st == 0) chk(a_state == 4'hf, "outputs held until the clock edge");
      else         chk(a_state == 4'(st - 1) || st == 1, "outputs held until the clock edge");
      @(negedge clk);
      // default instance
      chk(a_state == ((st == 0) ? 4'hf : 4'(st)), $sformatf("state after one edge st=%0d", st));
      equal_share(4, 32, st, c);
      for (int i = 0; i < 4; i++)
        chk(a_alloc[i] == 6'(c[i]), $sformatf("m4 alloc st=%0d region=%0d got=%0d exp=%0d",
                                               st, i, a_alloc[i], c[i]));
      s = new[32];
      foreach (s[k]) s[k] = int'(a_sel[k]);
      chk(sel_errors(4, 32, s, c) == 0, $sformatf("m4 select set st=%0d", st));
      // two-region table
      if (st < 4) begin
        equal_share(2, 2, st, c);
        for (int i = 0; i < 2; i++)
          chk(b_alloc[i] == 2'(c[i]), $sformatf("m2 alloc st=%0d", st));
        case (st)
          1: chk(b_sel[0] == 0 && b_sel[1] == 1, "only R_A: (A0, A1)");
          2: chk(b_sel[0] == 1 && b_sel[1] == 0, "only R_B: (B1, B0)");
          3: chk(b_sel[0] == 0 && b_sel[1] == 0, "both: (A0, B0)");
          default: chk(b_sel[0] == 0 && b_sel[1] == 0, "zero knob: all active");
        endcase
      end
      // weighted three-region instance
      if (st < 8) begin
        c = new[3];
        foreach (c[i]) c[i] = hand_c[st][i];
        for (int i = 0; i < 3; i++)
          chk(c_alloc[i] == 3'(c[i]), $sformatf("m3 weighted alloc st=%0d region=%0d got=%0d exp=%0d",
                                                 st, i, c_alloc[i], c[i]));
        s = new[6];
        foreach (s[k]) s[k] = int'(c_sel[k]);
        chk(sel_errors(3, 6, s, c) == 0, $sformatf("m3 weighted select set st=%0d", st));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
