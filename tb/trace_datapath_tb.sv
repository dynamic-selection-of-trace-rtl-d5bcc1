// trace_datapath_tb: checks the wiring of the reduced multiplexer structure.
//
// Two instances: M = 3, N = 3 (the three-region example, 5-input multiplexers)
// and the default M = 4, N = 32 (73-input multiplexers). The expected input
// list of every multiplexer is built here from the rule: the home region's
// signal k mod (N/M), then the remaining N - N/M signals of each other region
// in region order. For each multiplexer and each select code the candidate at
// the expected position is driven alone high (output must be 1) and alone low
// (output must be 0). The M = 3 instance is also checked against the
// explicit input lists {A1,B2,B3,C2,C3}, {B1,A2,A3,C2,C3}, {C1,A2,A3,B2,B3}.
module trace_datapath_tb;
  int checks = 0, failures = 0;

  // ---- M = 3, N = 3 ----
  localparam int unsigned SM = 3, SN = 3, SW = 3;
  logic [SM-1:0][SN-1:0] s_cand;
  logic [SN-1:0][SW-1:0] s_sel;
  logic [SN-1:0]         s_trace;
  trace_datapath #(.M(SM), .N(SN)) dut_s (.cand(s_cand), .sel(s_sel), .trace(s_trace));

  // ---- M = 4, N = 32 ----
  localparam int unsigned LM = 4, LN = 32, LW = 7;
  logic [LM-1:0][LN-1:0] l_cand;
  logic [LN-1:0][LW-1:0] l_sel;
  logic [LN-1:0]         l_trace;
  trace_datapath dut_l (.cand(l_cand), .sel(l_sel), .trace(l_trace));

  task automatic chk(input logic got, input logic exp, input string what, input int k, input int c);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s mux=%0d code=%0d got=%b exp=%b", what, k, c, got, exp);
    end
  endtask

  // Expected (region, priority) list of multiplexer k.
  function automatic void exp_list(input int m, input int n, input int k,
                                   output int reg_q[$], output int pri_q[$]);
    int h = n / m;
    reg_q = {};
    pri_q = {};
    reg_q.push_back(k / h);
    pri_q.push_back(k % h);
    for (int i = 0; i < m; i++)
      if (i != k / h)
        for (int p = h; p < n; p++) begin
          reg_q.push_back(i);
          pri_q.push_back(p);
        end
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rq[$], pq[$];
    // Explicit lists for M = N = 3: region A = 0, B = 1, C = 2; A1 = priority 0.
    automatic int fig_r[3][5] = '{'{0,1,1,2,2}, '{1,0,0,2,2}, '{2,0,0,1,1}};
    automatic int fig_p[3][5] = '{'{0,1,2,1,2}, '{0,1,2,1,2}, '{0,1,2,1,2}};

    chk(dst_pkg::mux_inputs(3, 3) == 5, 1'b1, "5-input mux for m=n=3", 0, 0);
    chk(dst_pkg::mux_inputs(4, 32) == 73, 1'b1, "73-input mux for m=4,n=32", 0, 0);

    s_sel = '0;
    for (int k = 0; k < SN; k++) begin
      exp_list(SM, SN, k, rq, pq);
      chk(rq.size() == 5, 1'b1, "list size", k, 0);
      for (int c = 0; c < 5; c++) begin
        chk(rq[c] == fig_r[k][c] && pq[c] == fig_p[k][c], 1'b1, "example list", k, c);
        s_sel[k] = SW'(c);
        s_cand = '0;
        s_cand[fig_r[k][c]][fig_p[k][c]] = 1'b1;
        #1 chk(s_trace[k], 1'b1, "m3 one-hot", k, c);
        s_cand = '1;
        s_cand[fig_r[k][c]][fig_p[k][c]] = 1'b0;
        #1 chk(s_trace[k], 1'b0, "m3 one-cold", k, c);
      end
    end

    l_sel = '0;
    for (int k = 0; k < LN; k++) begin
      exp_list(LM, LN, k, rq, pq);
      chk(rq.size() == 73, 1'b1, "list size", k, 0);
      for (int c = 0; c < rq.size(); c++) begin
        l_sel[k] = LW'(c);
        l_cand = '0;
        l_cand[rq[c]][pq[c]] = 1'b1;
        #1 chk(l_trace[k], 1'b1, "m4 one-hot", k, c);
        l_cand = '1;
        l_cand[rq[c]][pq[c]] = 1'b0;
        #1 chk(l_trace[k], 1'b0, "m4 one-cold", k, c);
      end
      // the other multiplexers keep their own selection
      l_cand = {$urandom, $urandom, $urandom, $urandom};
      #1 chk(l_trace[k], l_cand[rq[rq.size()-1]][pq[pq.size()-1]], "m4 random", k, 72);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
