// tb_sim_anneal: one annealing module on an 8-city problem with its own
// distance matrix and random generator. The testbench keeps its own copy of
// the tour; at every swap decision it recomputes the energy change from the
// two positions drawn and its own distance table, and the acceptance from the
// random number consumed and the 4-term integer series, and checks the
// module's decision. At the end it checks the module's tour and its length.
// Also checks that a swap attempt takes 15 clocks at best, that the module
// stops at a swap boundary when run falls, and that downhill, uphill-accepted
// and uphill-rejected swaps all occurred.
module tb_sim_anneal;
  import rawcs_pkg::*;
  localparam int C = 8, CW = 3, IW = 6, BASE = 64;
  logic clk = 0, rst;
  host_req_t req;
  logic run, idle, tried, accepted;
  logic [31:0] temp, dist_in, cur_dist;
  logic [IW-1:0] dist_req;
  logic rnd_valid, rnd_ok, rnd_next;
  logic [30:0] rnd_raw;
  logic [CW-1:0] rnd_uniform;
  logic [CW-1:0] order [C];
  logic [IW-1:0] idx [1];
  logic [31:0] dans [1];
  int checks = 0, failures = 0;

  assign idx[0] = dist_req;
  assign dist_in = dans[0];

  dist_matrix #(.DW(32), .CITIES(C), .NPORTS(1), .BASE(0)) u_dm (.clk, .req, .index(idx), .dout(dans));
  subtractive_rand #(.SEED(-500), .M(C)) u_rnd (.clk, .rst, .next(rnd_next), .valid(rnd_valid),
    .raw(rnd_raw), .uniform(rnd_uniform), .uniform_ok(rnd_ok), .seeded());
  sim_anneal #(.CITIES(C), .DW(32), .BASE(BASE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
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

  int D [C][C];
  int sh [C];             // shadow tour
  int n_down = 0, n_up_acc = 0, n_up_rej = 0, n_commit = 0;
  longint raw_used;
  bit have_raw;
  int last_commit = -1, min_gap = 1000, cyc = 0;

  function automatic int md(int a); return ((a % C) + C) % C; endfunction
  function automatic int tour_len();
    int l = 0;
    for (int i = 0; i < C; i++) l += D[sh[i]][sh[md(i+1)]];
    return l;
  endfunction
  function automatic longint tdiv(longint a, longint b);
    longint q; q = (a < 0 ? -a : a) / b; return (a < 0) ? -q : q;
  endfunction

  // Decision monitor.
  always @(posedge clk) begin
    cyc++;
    if (!rst && dut.state == 4'd6 && rnd_next) begin
      raw_used = rnd_raw; have_raw = 1;
    end
    if (!rst && tried) begin
      int p0, p1, a, b, c2, d2, e, f;
      longint de, x, y;
      bit exp_acc;
      p0 = dut.p0; p1 = dut.p1;
      a = sh[md(p0-1)]; b = sh[p0]; c2 = sh[md(p0+1)];
      d2 = sh[md(p1-1)]; e = sh[p1]; f = sh[md(p1+1)];
      de = D[a][e] + D[e][c2] + D[d2][b] + D[b][f] - D[a][b] - D[b][c2] - D[d2][e] - D[e][f];
      check("energy change", longint'(dut.delta_q), de);
      if (de < 0) begin
        exp_acc = 1; n_down++;
        check("no random drawn downhill", have_raw, 0);
      end else begin
        x = -tdiv(de, longint'(temp));
        y = 1 + x + tdiv(x*x, 2) + tdiv(x*x*x, 6) + tdiv(x*x*x*x, 24);
        exp_acc = (y > 0) && (raw_used < y * 64'h8000_0000);
        check("random drawn uphill", have_raw, 1);
        if (exp_acc) n_up_acc++; else n_up_rej++;
      end
      check("accept decision", accepted, exp_acc);
      if (exp_acc) begin
        int tmp; tmp = sh[p0]; sh[p0] = sh[p1]; sh[p1] = tmp;
      end
      have_raw = 0;
      n_commit++;
      if (last_commit >= 0 && cyc - last_commit < min_gap) min_gap = cyc - last_commit;
      last_commit = cyc;
    end
  end

  initial begin
    int stop_wait, seen;
    rst = 1; req = HOST_IDLE; run = 0; temp = 0; have_raw = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // Distance table: symmetric, zero diagonal.
    for (int i = 0; i < C; i++)
      for (int j = i; j < C; j++) begin
        D[i][j] = (i == j) ? 0 : $urandom_range(1, 60);
        D[j][i] = D[i][j];
      end
    for (int i = 0; i < C; i++)
      for (int j = 0; j < C; j++) begin
        req = HOST_IDLE; req.wr = 1; req.addr = 24'(i + C*j); req.wdata = D[i][j];
        @(negedge clk);
      end
    // Initial tour: a fixed permutation.
    for (int i = 0; i < C; i++) sh[i] = (i * 3) % C;
    for (int i = 0; i < C; i++) begin
      req = HOST_IDLE; req.wr = 1; req.addr = 24'(BASE + i); req.wdata = sh[i];
      @(negedge clk);
    end
    req = HOST_IDLE; req.wr = 1; req.addr = 24'(BASE + C); req.wdata = tour_len();
    @(negedge clk);
    req = HOST_IDLE;
    // Anneal over a falling temperature.
    for (int t = 40; t >= 2; t -= 2) begin
      temp = t; run = 1;
      repeat (400) @(negedge clk);
    end
    run = 0;
    stop_wait = 0;
    while (!idle) begin @(negedge clk); stop_wait++; end
    checks++;
    if (stop_wait > 15 + 60) begin failures++; $display("FAIL stop took %0d clocks", stop_wait); end
    seen = n_commit;
    repeat (50) @(negedge clk);
    check("no attempts after stop", n_commit, seen);
    for (int i = 0; i < C; i++) check($sformatf("tour[%0d]", i), order[i], sh[i]);
    check("tour length", cur_dist, tour_len());
    check("fastest attempt clocks", min_gap, 15);
    $display("count: attempts=%0d downhill=%0d uphill_accepted=%0d uphill_rejected=%0d",
             n_commit, n_down, n_up_acc, n_up_rej);
    checks++; if (n_down == 0)   begin failures++; $display("FAIL no downhill swap"); end
    checks++; if (n_up_acc == 0) begin failures++; $display("FAIL no uphill swap accepted"); end
    checks++; if (n_up_rej == 0) begin failures++; $display("FAIL no uphill swap rejected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
