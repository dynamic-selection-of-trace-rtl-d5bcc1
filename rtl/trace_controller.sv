// trace_controller: chooses which N of the M x N candidate signals are traced.
//
// The external knob active_regions says which regions of the circuit are
// currently relevant (bit i = region R_i). For a set of active regions the
// N trace slots are shared in proportion to each region's relevance weight
// r_i: region i gets C_i = N * r_i / r slots, r being the sum of the weights of
// the active regions, and fills them with its C_i best signals. Inactive
// regions get none. C_i is rounded by largest remainder (floor first, then
// one extra slot to the regions with the largest remainders, lower index on a
// tie) so that the C_i always add up to N. An all-zero knob counts as "all
// regions active"; active regions whose weights are all 0 share equally.
//
// Placement on the reduced multiplexer structure of trace_datapath: region i's
// first min(C_i, N/M) signals go to its own home multiplexers (code 0); its
// signals N/M .. C_i-1 go, in region order, to the home multiplexers of other
// regions that use fewer than N/M of theirs. Since the C_i add up to N there
// are exactly as many such free multiplexers as surplus signals.
//
// All 2^M knob values are evaluated at elaboration into a constant table (the
// relevance weights are parameters), so the hardware is a register plus a
// table look-up. Timing: the knob is sampled at each rising clock edge; the
// selects and alloc (C_i per region) for it are valid from that edge on and
// choose the signals stored by the trace buffer at the next edge. Reset
// (synchronous, active low) selects "all regions active".
//
// A concurrent assertion checks that the shares in effect add up to N.
//
// The proportional rule follows the document; summing r over the active
// regions only, the rounding, the zero-knob rule and the placement order are
// this design's choices.
module trace_controller
  import dst_pkg::*;
#(
  parameter int unsigned        M         = 4,
  parameter int unsigned        N         = 32,
  parameter logic [M-1:0][7:0]  RELEVANCE = {M{8'd1}},
  parameter int unsigned        SELW      = sel_width(M, N),
  parameter int unsigned        CW        = $clog2(N + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [M-1:0]           active_regions,
  output logic [M-1:0]           state,
  output logic [N-1:0][SELW-1:0] sel,
  output logic [M-1:0][CW-1:0]   alloc
);

  localparam int unsigned H   = home_slots(M, N);
  localparam int unsigned REM = remain_slots(M, N);
  localparam int unsigned NST = 2 ** M;

  typedef logic [NST-1:0][N-1:0][SELW-1:0] sel_table_t;
  typedef logic [NST-1:0][M-1:0][CW-1:0]   alloc_table_t;

  if (N % M != 0) begin : g_bad_size
    $error("trace_controller: N (%0d) must be a multiple of M (%0d)", N, M);
  end

  // Slots per region for one knob value (Algorithm 2, step 2).
  function automatic alloc_table_t build_alloc();
    alloc_table_t t;
    t = '0;
    for (int unsigned st = 0; st < NST; st++) begin
      logic [M-1:0] act;
      int unsigned  r, given, c [M], rem_v [M];
      bit           bumped [M];
      act = (st == 0) ? '1 : M'(st);
      r = 0;
      for (int unsigned i = 0; i < M; i++)
        if (act[i]) r += 32'(RELEVANCE[i]);
      given = 0;
      for (int unsigned i = 0; i < M; i++) begin
        int unsigned w;
        w = (r == 0) ? 1 : 32'(RELEVANCE[i]);
        c[i] = 0;
        rem_v[i] = 0;
        bumped[i] = 1'b0;
        if (act[i]) begin
          c[i]     = (N * w) / ((r == 0) ? $countones(act) : r);
          rem_v[i] = (N * w) % ((r == 0) ? $countones(act) : r);
          given   += c[i];
        end
      end
      // Hand out the slots lost to rounding, largest remainder first.
      while (given < N) begin
        int best;
        best = -1;
        for (int unsigned i = 0; i < M; i++)
          if (act[i] && !bumped[i] && (best < 0 || rem_v[i] > rem_v[best]))
            best = int'(i);
        bumped[best] = 1'b1;
        c[best]++;
        given++;
      end
      for (int unsigned i = 0; i < M; i++)
        t[st][i] = CW'(c[i]);
    end
    return t;
  endfunction

  localparam alloc_table_t ALLOC = build_alloc();

  // Select code of every multiplexer for one knob value.
  function automatic sel_table_t build_sel();
    sel_table_t t;
    t = '0;
    for (int unsigned st = 0; st < NST; st++) begin
      int unsigned c [M];
      int unsigned src, nxt;
      for (int unsigned i = 0; i < M; i++)
        c[i] = int'(ALLOC[st][i]);
      // (src, nxt): next surplus signal to place, region src, priority nxt.
      src = 0;
      nxt = H;
      for (int unsigned k = 0; k < N; k++) begin
        int unsigned home, slot;
        home = k / H;
        slot = k % H;
        if (slot < c[home]) begin
          t[st][k] = '0;
        end else begin
          while (src < M && nxt >= c[src]) begin
            src++;
            nxt = H;
          end
          if (src < M) begin
            t[st][k] = SELW'(1 + ((src < home) ? src : src - 1) * REM + (nxt - H));
            nxt++;
          end
        end
      end
    end
    return t;
  endfunction

  localparam sel_table_t SEL = build_sel();

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= '1;
      sel   <= SEL[NST-1];
      alloc <= ALLOC[NST-1];
    end else begin
      state <= (active_regions == '0) ? '1 : active_regions;
      sel   <= SEL[active_regions];
      alloc <= ALLOC[active_regions];
    end
  end

  // Every trace bit must carry a signal (the shares add up to N) and the
  // state in effect always names at least one region.
  function automatic int unsigned alloc_sum(logic [M-1:0][CW-1:0] a);
    int unsigned sum = 0;
    for (int unsigned i = 0; i < M; i++) sum += 32'(a[i]);
    return sum;
  endfunction

  a_full_share: assert property (@(posedge clk) disable iff (!rst_n)
    alloc_sum(alloc) == N && state != '0)
    else $error("trace_controller: shares add up to %0d, not %0d", alloc_sum(alloc), N);

endmodule
