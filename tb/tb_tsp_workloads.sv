// tb_tsp_workloads: the annealing engine on the smaller evaluated problem
// sizes, 20 and 80 random cities, each on an engine built for that size
// with four annealing modules and every other setting at its default (250
// clocks per temperature and city, 60 accepts per city, integer four-term
// series), cooled linearly from T = 67. The host starts every module from a
// nearest-neighbour tour. Checks for each size: the run ends with done, the
// returned tour is a permutation, the reported length equals the length of
// that tour computed here, and it is the shortest of the four modules'
// tours. Prints the start and final lengths and the clocks taken.
module tb_tsp_workloads;
  import rawcs_pkg::*;
  localparam int NS = 4;
  logic clk = 0, rst;
  host_req_t req20, req80;
  logic [31:0] rd20, rd80;
  logic done20, done80, c20, e20, f20, c80, e80, f80;
  int checks = 0, failures = 0;

  tsp_anneal #(.CITIES(20), .NUM_SA(NS)) u20 (.clk, .rst, .req(req20), .rdata(rd20), .done(done20),
    .ev_cool(c20), .ev_early(e20), .ev_frozen(f20));
  tsp_anneal #(.CITIES(80), .NUM_SA(NS)) u80 (.clk, .rst, .req(req80), .rdata(rd80), .done(done80),
    .ev_cool(c80), .ev_early(e80), .ev_frozen(f80));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
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

  // One complete run on an engine of c cities; sel picks which engine's bus.
  task automatic run(int c);
    int xs[], ys[], d[], tour[], t[], vis[];
    int cb = c*c + NS*(c+1), l0, l, cyc, cur;
    xs = new[c]; ys = new[c]; d = new[c*c]; tour = new[c]; t = new[c]; vis = new[c];
    for (int i = 0; i < c; i++) begin xs[i] = $urandom_range(0, 1000); ys[i] = $urandom_range(0, 1000); end
    for (int i = 0; i < c; i++)
      for (int j = 0; j < c; j++)
        d[i + c*j] = $rtoi($sqrt($itor((xs[i]-xs[j])*(xs[i]-xs[j]) + (ys[i]-ys[j])*(ys[i]-ys[j]))));
    // Nearest-neighbour start tour from city 0.
    foreach (vis[i]) vis[i] = 0;
    cur = 0; vis[0] = 1; tour[0] = 0;
    for (int k = 1; k < c; k++) begin
      int best = -1;
      for (int i = 0; i < c; i++)
        if (!vis[i] && (best < 0 || d[cur + c*i] < d[cur + c*best])) best = i;
      tour[k] = best; vis[best] = 1; cur = best;
    end
    l0 = 0;
    for (int i = 0; i < c; i++) l0 += d[tour[i] + c*tour[(i+1)%c]];
    for (int a = 0; a < c*c; a++) wr(c, a, d[a]);
    for (int j = 0; j < NS; j++) begin
      for (int i = 0; i < c; i++) wr(c, c*c + j*(c+1) + i, tour[i]);
      wr(c, c*c + j*(c+1) + c, l0);
    end
    wr(c, cb, 67);
    cyc = 0;
    while (!(c == 20 ? done20 : done80)) begin @(negedge clk); cyc++; end
    rd(c, cb, l);
    for (int i = 0; i < c; i++) rd(c, cb + 1 + i, t[i]);
    foreach (vis[i]) vis[i] = 0;
    foreach (t[i]) if (t[i] >= 0 && t[i] < c) vis[t[i]]++;
    foreach (vis[i]) check($sformatf("%0d cities: city %0d visited once", c, i), vis[i], 1);
    begin
      int lt = 0;
      for (int i = 0; i < c; i++) lt += d[t[i] + c*t[(i+1)%c]];
      check($sformatf("%0d cities: reported length", c), l, lt);
    end
    check($sformatf("%0d cities: shortest module chosen", c), l, min_len(c));
    $display("count: %0d cities: %0d clocks, tour length %0d -> %0d", c, cyc, l0, l);
  endtask

  task automatic wr(int c, int a, int v);
    host_req_t r;
    r = HOST_IDLE; r.wr = 1; r.addr = 24'(a); r.wdata = v;
    if (c == 20) req20 = r; else req80 = r;
    @(negedge clk);
    req20 = HOST_IDLE; req80 = HOST_IDLE;
  endtask

  task automatic rd(int c, int a, output int v);
    host_req_t r;
    r = HOST_IDLE; r.rd = 1; r.addr = 24'(a);
    if (c == 20) req20 = r; else req80 = r;
    #1;
    v = (c == 20) ? rd20 : rd80;
    req20 = HOST_IDLE; req80 = HOST_IDLE;
  endtask

  function automatic int min_len(int c);
    int m[NS];
    if (c == 20) begin
      m[0] = u20.g_sa[0].u_sa.cur_dist; m[1] = u20.g_sa[1].u_sa.cur_dist;
      m[2] = u20.g_sa[2].u_sa.cur_dist; m[3] = u20.g_sa[3].u_sa.cur_dist;
    end else begin
      m[0] = u80.g_sa[0].u_sa.cur_dist; m[1] = u80.g_sa[1].u_sa.cur_dist;
      m[2] = u80.g_sa[2].u_sa.cur_dist; m[3] = u80.g_sa[3].u_sa.cur_dist;
    end
    return m.min()[0];
  endfunction

  initial begin
    rst = 1; req20 = HOST_IDLE; req80 = HOST_IDLE;
    repeat (2) @(negedge clk);
    rst = 0;
    run(20);
    run(80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
