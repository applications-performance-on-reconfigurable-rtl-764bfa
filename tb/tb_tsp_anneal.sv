// tb_tsp_anneal: the whole annealing engine on a random 8-city Euclidean
// problem, run twice: with the integer 4-term acceptance series of the
// default configuration, and with a 3-term series in 8-bit fixed point.
// The testbench loads the distance table and a starting tour into both
// modules, starts the schedule, waits for done and checks that the tour read
// back is a permutation whose length (computed here) is the length reported,
// that this is the shortest of the modules' tours, and that every module's
// length matches its own tour. It counts schedule events (normal cooling,
// early drop, frozen end) and downhill / uphill-accepted swaps and fails if
// one of them never happened.
module tb_tsp_anneal;
  import rawcs_pkg::*;
  localparam int C = 8, NS = 2;
  localparam int CB = C*C + NS*(C+1);
  logic clk = 0, rst;
  host_req_t req;
  logic [31:0] rdata_a, rdata_b;
  logic done_a, done_b, cool_a, cool_b, early_a, early_b, frozen_a, frozen_b;
  int checks = 0, failures = 0;

  tsp_anneal #(.CITIES(C), .NUM_SA(NS), .TRIES_PER_T(20), .ACCEPTS_PER_T(1)) dut_a (
    .clk, .rst, .req, .rdata(rdata_a), .done(done_a),
    .ev_cool(cool_a), .ev_early(early_a), .ev_frozen(frozen_a));
  tsp_anneal #(.CITIES(C), .NUM_SA(NS), .TRIES_PER_T(20), .ACCEPTS_PER_T(1),
               .TERMS(3), .FRAC(8)) dut_b (
    .clk, .rst, .req, .rdata(rdata_b), .done(done_b),
    .ev_cool(cool_b), .ev_early(early_b), .ev_frozen(frozen_b));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string w, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", w, got, exp);
    end
  endtask

  int n_cool = 0, n_early = 0, n_frozen = 0, n_down = 0, n_up = 0;
  always @(posedge clk) if (!rst) begin
    n_cool   += int'(cool_a) + int'(cool_b);
    n_early  += int'(early_a) + int'(early_b);
    n_frozen += int'(frozen_a) + int'(frozen_b);
    if (dut_a.g_sa[0].u_sa.accepted) begin
      if (dut_a.g_sa[0].u_sa.delta_q < 0) n_down++; else n_up++;
    end
    if (dut_b.g_sa[1].u_sa.accepted) begin
      if (dut_b.g_sa[1].u_sa.delta_q < 0) n_down++; else n_up++;
    end
  end

  int D [C][C];
  function automatic int len_of(int t[C]);
    int l = 0;
    for (int i = 0; i < C; i++) l += D[t[i]][t[(i+1)%C]];
    return l;
  endfunction

  task automatic wr(int a, int d);
    req = HOST_IDLE; req.wr = 1; req.addr = 24'(a); req.wdata = d;
    @(negedge clk);
    req = HOST_IDLE;
  endtask

  task automatic check_result(bit which);
    int t[C], seen, l, mn, v;
    req = HOST_IDLE; req.rd = 1; req.addr = 24'(CB); #1;
    l = which ? rdata_b : rdata_a;
    seen = 0;
    for (int i = 0; i < C; i++) begin
      req.addr = 24'(CB + 1 + i); #1;
      t[i] = which ? rdata_b : rdata_a;
      seen |= 1 << t[i];
    end
    req = HOST_IDLE;
    check("tour is a permutation", seen, (1 << C) - 1);
    check("reported length", l, len_of(t));
    // Each module's own tour and length (read through the hierarchy).
    mn = 32'h7fffffff;
    for (int j = 0; j < NS; j++) begin
      int tj[C], dj;
      for (int i = 0; i < C; i++)
        tj[i] = which ? ((j == 0) ? dut_b.g_sa[0].u_sa.order[i] : dut_b.g_sa[1].u_sa.order[i])
                      : ((j == 0) ? dut_a.g_sa[0].u_sa.order[i] : dut_a.g_sa[1].u_sa.order[i]);
      dj = which ? ((j == 0) ? dut_b.g_sa[0].u_sa.cur_dist : dut_b.g_sa[1].u_sa.cur_dist)
                 : ((j == 0) ? dut_a.g_sa[0].u_sa.cur_dist : dut_a.g_sa[1].u_sa.cur_dist);
      check("module length", dj, len_of(tj));
      if (dj < mn) mn = dj;
    end
    check("shortest chosen", l, mn);
    $display("count: engine %0d final length %0d", which, l);
  endtask

  initial begin
    int xs[C], ys[C], init[C], cyc;
    rst = 1; req = HOST_IDLE;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < C; i++) begin xs[i] = $urandom_range(0, 100); ys[i] = $urandom_range(0, 100); end
    for (int i = 0; i < C; i++)
      for (int j = 0; j < C; j++)
        D[i][j] = $rtoi($sqrt($itor((xs[i]-xs[j])*(xs[i]-xs[j]) + (ys[i]-ys[j])*(ys[i]-ys[j]))));
    for (int i = 0; i < C; i++)
      for (int j = 0; j < C; j++) wr(i + C*j, D[i][j]);
    for (int i = 0; i < C; i++) init[i] = i;
    $display("count: initial length %0d", len_of(init));
    for (int j = 0; j < NS; j++) begin
      for (int i = 0; i < C; i++) wr(C*C + j*(C+1) + i, init[i]);
      wr(C*C + j*(C+1) + C, len_of(init));
    end
    wr(CB, 40);
    cyc = 0;
    while (!(done_a && done_b)) begin @(negedge clk); cyc++; end
    $display("count: run clocks %0d", cyc);
    check_result(0);
    check_result(1);
    $display("count: cool=%0d early=%0d frozen=%0d downhill=%0d uphill=%0d",
             n_cool, n_early, n_frozen, n_down, n_up);
    checks++; if (n_cool == 0)   begin failures++; $display("FAIL no normal cooling step"); end
    checks++; if (n_early == 0)  begin failures++; $display("FAIL no early drop"); end
    checks++; if (n_frozen == 0) begin failures++; $display("FAIL no frozen end"); end
    checks++; if (n_down == 0)   begin failures++; $display("FAIL no downhill swap"); end
    checks++; if (n_up == 0)     begin failures++; $display("FAIL no uphill swap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
