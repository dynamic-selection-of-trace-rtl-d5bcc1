// dst_top_tb: end-to-end test of the dynamic signal tracing unit at its
// default size (M = 4 regions, N = 32 trace bits, 32 x 1024 trace buffer,
// equal relevance).
//
// Phase 1, per knob value (all 16, including the all-zero knob): with tracing
// disabled, every one of the 128 candidate signals is driven alone high and
// the trace word shows which multiplexer carries it. The TB checks that the
// traced set is exactly the best C_i signals of every active region, with
// C_i = 32/k for k active regions (the first 32 % k active regions one
// more), each on exactly one bit, and a region's first 8 signals on its own
// home bits. The discovered routing is kept per knob value.
// Phase 2: random candidate values every cycle, the knob switched at random
// intervals, tracing enabled on most cycles. The TB predicts each traced word
// from the routing of the knob value in effect (the knob registered one edge
// earlier), keeps its own copy of the buffer, runs past a wrap-around and
// then reads the whole buffer back.
// Mechanisms counted (a failure if one never happens): region-set switches,
// each knob value, a region taking more than N/M bits (surplus routing),
// cycles with tracing disabled, buffer wrap, all-zero knob.
module dst_top_tb;
  localparam int unsigned M = 4, N = 32, H = N / M, DEPTH = 1024, AW = 10, CW = 6;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0]         knob, state;
  logic [M-1:0][N-1:0]  cand;
  logic                 trace_en;
  logic [N-1:0]         trace_word, rd_data;
  logic [M-1:0][CW-1:0] alloc;
  logic [AW-1:0]        rd_addr, wr_ptr;
  logic                 wrapped;

  dst_top dut (.clk, .rst_n, .active_regions(knob), .cand, .trace_en, .trace_word, .state,
               .alloc, .rd_addr, .rd_data, .wr_ptr, .wrapped);

  int route [16][N];                  // per knob value: candidate index on bit k
  logic [N-1:0] model [DEPTH];
  int writes = 0;
  int n_switch = 0, n_surplus = 0, n_stall = 0, n_zero = 0, n_wrap = 0;
  int seen [16];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic void share(input int st, output int c[M]);
    int act = (st == 0) ? (1 << M) - 1 : st;
    int k = $countones(act), cnt = 0;
    for (int i = 0; i < M; i++) begin
      c[i] = 0;
      if (act[i]) begin
        c[i] = N / k + ((cnt < N % k) ? 1 : 0);
        cnt++;
      end
    end
  endfunction

  function automatic logic [N-1:0] predict(input int st, input logic [M-1:0][N-1:0] cv);
    logic [N-1:0] w;
    for (int k = 0; k < N; k++) w[k] = cv[route[st][k] / N][route[st][k] % N];
    return w;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c [M];
    int cur, nxt_switch, cycles;
    knob = '0; cand = '0; trace_en = 1'b0; rd_addr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // ---------------- phase 1: routing of every knob value ----------------
    for (int st = 0; st < 16; st++) begin
      int hits [N];
      knob = 4'(st);
      @(negedge clk);
      n_stall++;
      if (st == 0) n_zero++;
      share(st, c);
      chk(state == ((st == 0) ? 4'hf : 4'(st)), $sformatf("state for knob %0d", st));
      for (int i = 0; i < M; i++) begin
        chk(alloc[i] == CW'(c[i]), $sformatf("alloc knob %0d region %0d", st, i));
        if (c[i] > H) n_surplus++;
      end
      foreach (hits[k]) hits[k] = 0;
      for (int i = 0; i < M; i++)
        for (int p = 0; p < N; p++) begin
          int bits;
          cand = '0;
          cand[i][p] = 1'b1;
          #1;
          bits = $countones(trace_word);
          chk(bits == ((p < c[i]) ? 1 : 0),
              $sformatf("knob %0d signal (%0d,%0d) on %0d bits, expected %0d", st, i, p, bits, p < c[i]));
          for (int k = 0; k < N; k++)
            if (trace_word[k]) begin
              route[st][k] = i * N + p;
              hits[k]++;
              if (p < H && p < c[i])
                chk(k == i * H + p, $sformatf("knob %0d signal (%0d,%0d) off its home bit", st, i, p));
            end
        end
      for (int k = 0; k < N; k++)
        chk(hits[k] == 1, $sformatf("knob %0d bit %0d carries %0d signals", st, k, hits[k]));
      chk(wr_ptr == 0, "nothing stored while tracing is disabled");
      @(negedge clk);
    end

    // ---------------- phase 2: traced execution ----------------
    cur = 15;
    knob = 4'hf;
    @(negedge clk);
    nxt_switch = 50;
    cycles = 0;
    while (writes < DEPTH * 2 + 300) begin
      logic [N-1:0] exp_w;
      cycles++;
      if (cycles == nxt_switch) begin
        int st;
        do st = $urandom % 16; while (((st == 0) ? 15 : st) == cur);
        knob = 4'(st);
        nxt_switch = cycles + 20 + $urandom % 180;
      end
      cand     = {$urandom, $urandom, $urandom, $urandom};
      trace_en = ($urandom % 8) != 0;
      #1;
      chk(state == 4'(cur), "state in effect");
      exp_w = predict(cur, cand);
      chk(trace_word == exp_w, $sformatf("trace word knob %0d got %h exp %h", cur, trace_word, exp_w));
      @(posedge clk);
      if (trace_en) begin
        model[writes % DEPTH] = exp_w;
        writes++;
        if (writes == DEPTH) n_wrap++;
      end else begin
        n_stall++;
      end
      if (((knob == 0) ? 15 : int'(knob)) != cur) begin
        n_switch++;
        if (knob == 0) n_zero++;
      end
      cur = (knob == 0) ? 15 : int'(knob);
      seen[cur]++;
      @(negedge clk);
    end
    trace_en = 1'b0;
    chk(wrapped, "buffer wrapped");
    chk(wr_ptr == AW'(writes % DEPTH), "write pointer");
    for (int a = 0; a < DEPTH; a++) begin
      rd_addr = AW'(a);
      @(posedge clk);
      @(negedge clk);
      chk(rd_data == model[a], $sformatf("buffer addr %0d got %h exp %h", a, rd_data, model[a]));
    end

    // ---------------- mechanisms ----------------
    $display("mechanisms: switches=%0d surplus_states=%0d stalls=%0d wraps=%0d zero_knob=%0d",
             n_switch, n_surplus, n_stall, n_wrap, n_zero);
    chk(n_switch > 0, "region-set switch happened");
    chk(n_surplus > 0, "surplus routing happened");
    chk(n_stall > 0, "tracing disabled happened");
    chk(n_wrap > 0, "buffer wrap happened");
    chk(n_zero > 0, "all-zero knob happened");
    $display("traced %0d words in %0d cycles, knob values seen in phase 2: %0d", writes, cycles,
             seen.sum() with (int'(item > 0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
