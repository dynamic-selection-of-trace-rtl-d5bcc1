// dst_workload_tb: the region scenarios of the evaluation, run on the
// default tracing unit (M = 4, N = 32, 32 x 1024 buffer, equal relevance).
//
// Scenarios: a circuit split into two regions (both active; only R_1; only
// R_2) and into three regions (each one alone; each pair), the unused
// regions of the 4-region unit never being active. Each scenario traces a
// 1000-cycle run of a stand-in circuit whose 128 candidate signals take
// random values, once error-free and once with single bit-flip errors, one
// every 100 cycles, in randomly chosen candidate signals of the active
// regions. The whole run must fit in the buffer without wrapping. Comparing
// the two buffer contents word by word reports each error whose signal is
// traced; the TB checks that an error is seen exactly when its signal is
// among the best C_i of its region, C_i = 32 / (active regions), and prints
// the detected count per scenario.
module dst_workload_tb;
  localparam int unsigned M = 4, N = 32, DEPTH = 1024, AW = 10, CYC = 1000, GAP = 100;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0]        knob, state;
  logic [M-1:0][N-1:0] cand;
  logic                trace_en;
  logic [N-1:0]        trace_word, rd_data;
  logic [M-1:0][5:0]   alloc;
  logic [AW-1:0]       rd_addr, wr_ptr;
  logic                wrapped;

  dst_top dut (.clk, .rst_n, .active_regions(knob), .cand, .trace_en, .trace_word, .state,
               .alloc, .rd_addr, .rd_data, .wr_ptr, .wrapped);

  logic [M-1:0][N-1:0] stim [CYC];
  logic [N-1:0]        golden [CYC];
  logic [N-1:0]        faulty [CYC];
  int                  err_reg [CYC / GAP], err_pri [CYC / GAP];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Trace one run; with inject set, flip the chosen signal every GAP cycles.
  task automatic run(input logic [M-1:0] act, input bit inject, output logic [N-1:0] dump [CYC]);
    rst_n = 1'b0;
    trace_en = 1'b0;
    knob = act;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < CYC; t++) begin
      cand = stim[t];
      if (inject && t % GAP == GAP / 2)
        cand[err_reg[t / GAP]][err_pri[t / GAP]] = ~cand[err_reg[t / GAP]][err_pri[t / GAP]];
      trace_en = 1'b1;
      @(negedge clk);
    end
    trace_en = 1'b0;
    chk(wr_ptr == AW'(CYC) && !wrapped, "1000-cycle run held without wrapping");
    for (int a = 0; a < CYC; a++) begin
      rd_addr = AW'(a);
      @(posedge clk);
      @(negedge clk);
      dump[a] = rd_data;
    end
  endtask

  task automatic scenario(input string name, input logic [M-1:0] act);
    int k = $countones(act), detected = 0, detectable = 0;
    int idx [$];
    for (int i = 0; i < M; i++) if (act[i]) idx.push_back(i);
    for (int t = 0; t < CYC; t++) stim[t] = {$urandom, $urandom, $urandom, $urandom};
    for (int e = 0; e < CYC / GAP; e++) begin
      err_reg[e] = idx[$urandom % k];
      err_pri[e] = $urandom % N;
    end
    run(act, 1'b0, golden);
    run(act, 1'b1, faulty);
    for (int e = 0; e < CYC / GAP; e++) begin
      int  t = e * GAP + GAP / 2;
      bit  seen = (golden[t] != faulty[t]);
      bit  exp  = err_pri[e] < N / k;
      chk(seen == exp, $sformatf("%s error %0d in (%0d,%0d) seen=%0d expected=%0d",
                                 name, e, err_reg[e], err_pri[e], seen, exp));
      detected += seen;
      detectable++;
    end
    for (int t = 0; t < CYC; t++)
      if (t % GAP != GAP / 2) chk(golden[t] == faulty[t], $sformatf("%s no error at cycle %0d", name, t));
    for (int i = 0; i < M; i++)
      chk(alloc[i] == 6'(act[i] ? N / k : 0), $sformatf("%s bits of region %0d", name, i));
    $display("%-24s active=%b: %0d bits per active region, %0d of %0d injected errors seen in the trace",
             name, act, N / k, detected, detectable);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    knob = '0; cand = '0; trace_en = 1'b0; rd_addr = '0;
    repeat (2) @(negedge clk);
    scenario("2 regions, both active", 4'b0011);
    scenario("2 regions, R1 active",   4'b0001);
    scenario("2 regions, R2 active",   4'b0010);
    scenario("3 regions, R1 active",   4'b0001);
    scenario("3 regions, R2 active",   4'b0010);
    scenario("3 regions, R3 active",   4'b0100);
    scenario("3 regions, R1+R2",       4'b0011);
    scenario("3 regions, R1+R3",       4'b0101);
    scenario("3 regions, R2+R3",       4'b0110);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
