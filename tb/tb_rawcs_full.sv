// tb_rawcs_full: one complete operation of the top level with every parameter
// at its default: a 256-key sort through the scan chain (fill markers, then
// all keys in descending order at one per clock), and a 10-city problem on
// four annealing modules under the linear schedule starting at T = 67 with
// 250 * 10 clocks per temperature. Checks the sorted output, and that the
// returned tour is a permutation whose length (computed here) is the length
// reported and the shortest of the four modules' tours.
module tb_rawcs_full;
  import rawcs_pkg::*;
  localparam int N = 256, C = 10, NS = 4;
  localparam int CB = C*C + NS*(C+1);
  logic clk = 0, rst;
  host_req_t sort_req, tsp_req;
  logic [31:0] sort_rdata, tsp_rdata;
  logic tsp_done, tsp_ev_cool, tsp_ev_early, tsp_ev_frozen;
  int checks = 0, failures = 0;

  rawcs_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
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

  int n_cool = 0, n_early = 0, n_frozen = 0;
  always @(posedge clk) if (!rst) begin
    n_cool   += int'(tsp_ev_cool);
    n_early  += int'(tsp_ev_early);
    n_frozen += int'(tsp_ev_frozen);
  end

  int D [C][C];
  function automatic int len_of(int t[C]);
    int l = 0;
    for (int i = 0; i < C; i++) l += D[t[i]][t[(i+1)%C]];
    return l;
  endfunction
  task automatic twr(int a, int d);
    tsp_req = HOST_IDLE; tsp_req.wr = 1; tsp_req.addr = 24'(a); tsp_req.wdata = d;
    @(negedge clk);
    tsp_req = HOST_IDLE;
  endtask

  initial begin
    logic [31:0] keys[$];
    int xs[C], ys[C], init[C], t[C], seen, l, mn, cyc;
    rst = 1; sort_req = HOST_IDLE; tsp_req = HOST_IDLE;
    repeat (2) @(negedge clk);
    rst = 0;
    fork
      begin
        // Sorter: descending input as in the document's driver, then random.
        for (int i = 0; i < N; i++) keys.push_back((i % 2) ? 32'(N - i) : $urandom >> 1);
        for (int i = 0; i < N; i++) begin
          sort_req = HOST_IDLE; sort_req.wr = 1; sort_req.addr = 24'd2000; sort_req.wdata = keys[i];
          @(negedge clk);
        end
        keys.rsort();
        for (int j = 0; j < 7 + N; j++) begin
          sort_req = HOST_IDLE; sort_req.rd = 1; sort_req.addr = 24'(N + 1);
          @(negedge clk);
          if (j < 7) check("fill marker", sort_rdata, 32'hffff_ffff);
          else       check("sorted key", sort_rdata, keys[j-7]);
        end
        sort_req = HOST_IDLE;
      end
      begin
        for (int i = 0; i < C; i++) begin xs[i] = $urandom_range(0, 500); ys[i] = $urandom_range(0, 500); end
        for (int i = 0; i < C; i++)
          for (int j = 0; j < C; j++)
            D[i][j] = $rtoi($sqrt($itor((xs[i]-xs[j])*(xs[i]-xs[j]) + (ys[i]-ys[j])*(ys[i]-ys[j]))));
        for (int i = 0; i < C; i++)
          for (int j = 0; j < C; j++) twr(i + C*j, D[i][j]);
        for (int i = 0; i < C; i++) init[i] = i;
        for (int j = 0; j < NS; j++) begin
          for (int i = 0; i < C; i++) twr(C*C + j*(C+1) + i, init[i]);
          twr(C*C + j*(C+1) + C, len_of(init));
        end
        twr(CB, 67);
        cyc = 0;
        while (!tsp_done) begin @(negedge clk); cyc++; end
        tsp_req = HOST_IDLE; tsp_req.rd = 1; tsp_req.addr = 24'(CB); #1;
        l = tsp_rdata;
        seen = 0;
        for (int i = 0; i < C; i++) begin
          tsp_req.addr = 24'(CB + 1 + i); #1;
          t[i] = tsp_rdata; seen |= 1 << t[i];
        end
        tsp_req = HOST_IDLE;
        check("tour is a permutation", seen, (1 << C) - 1);
        check("tour length", l, len_of(t));
        mn = dut.u_tsp.g_sa[0].u_sa.cur_dist;
        if (dut.u_tsp.g_sa[1].u_sa.cur_dist < mn) mn = dut.u_tsp.g_sa[1].u_sa.cur_dist;
        if (dut.u_tsp.g_sa[2].u_sa.cur_dist < mn) mn = dut.u_tsp.g_sa[2].u_sa.cur_dist;
        if (dut.u_tsp.g_sa[3].u_sa.cur_dist < mn) mn = dut.u_tsp.g_sa[3].u_sa.cur_dist;
        check("shortest module chosen", l, mn);
        $display("count: annealing clocks %0d, tour length %0d -> %0d", cyc, len_of(init), l);
      end
    join
    $display("count: cool=%0d early=%0d frozen=%0d", n_cool, n_early, n_frozen);
    checks++;
    if (n_cool + n_early == 0) begin failures++; $display("FAIL temperature never changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
