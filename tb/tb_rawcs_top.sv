// tb_rawcs_top: end-to-end test of both structures in the top level, at
// reduced sizes (16-key sorter, 8-city / 2-module annealer with a short
// schedule and the 3-term fixed-point acceptance), running at the same time.
// Sorter: keys loaded through the scan chain, the fill markers, then all keys
// in descending order at one per clock, then the exhausted value 0; two
// rounds with a reset in between. Annealer: loads the problem, runs the schedule and checks the
// returned tour and length. Every mechanism is counted and must occur at
// least once: scan shifts, fill markers, key outputs, temperature steps,
// early drops, the frozen end, position pairs drawn again, downhill swaps,
// uphill swaps accepted and uphill swaps rejected.
module tb_rawcs_top;
  import rawcs_pkg::*;
  localparam int N = 16, C = 8, NS = 2;
  localparam int CB = C*C + NS*(C+1);
  logic clk = 0, rst;
  host_req_t sort_req, tsp_req;
  logic [31:0] sort_rdata, tsp_rdata;
  logic tsp_done, tsp_ev_cool, tsp_ev_early, tsp_ev_frozen;
  int checks = 0, failures = 0;

  rawcs_top #(.SORT_N(N), .CITIES(C), .NUM_SA(NS), .TRIES_PER_T(20), .ACCEPTS_PER_T(1),
              .TERMS(3), .FRAC(8)) dut (.*);

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

  // Mechanism counters.
  int n_scan = 0, n_marker = 0, n_key = 0;
  int n_cool = 0, n_early = 0, n_frozen = 0, n_redraw = 0, n_down = 0, n_upacc = 0, n_uprej = 0;
  always @(posedge clk) if (!rst) begin
    n_cool   += int'(tsp_ev_cool);
    n_early  += int'(tsp_ev_early);
    n_frozen += int'(tsp_ev_frozen);
    if (dut.u_tsp.g_sa[0].u_sa.state == 4'd3 && !dut.u_tsp.g_sa[0].u_sa.pair_ok) n_redraw++;
    if (dut.u_tsp.g_sa[0].u_sa.tried) begin
      if (dut.u_tsp.g_sa[0].u_sa.delta_q < 0) n_down++;
      else if (dut.u_tsp.g_sa[0].u_sa.accepted) n_upacc++;
      else n_uprej++;
    end
  end

  // ---------------------------------------------------------------- sorter
  task automatic sort_round(int round);
    logic [31:0] keys[$];
    int lg = $clog2(N);
    for (int i = 0; i < N; i++) keys.push_back((round == 0) ? 32'($urandom_range(0, 1000)) : 32'($urandom) >> 1);
    for (int i = 0; i < N; i++) begin
      sort_req = HOST_IDLE; sort_req.wr = 1; sort_req.addr = 24'd2000; sort_req.wdata = keys[i];
      @(negedge clk);
      n_scan++;
    end
    keys.rsort();
    for (int j = 0; j < lg - 1 + N + 1; j++) begin
      sort_req = HOST_IDLE; sort_req.rd = 1; sort_req.addr = 24'(N + 1);
      @(negedge clk);
      if (j < lg - 1) begin check("fill marker", sort_rdata, 32'hffff_ffff); n_marker++; end
      else if (j < lg - 1 + N) begin check("sorted key", sort_rdata, keys[j-lg+1]); n_key++; end
      else check("exhausted", sort_rdata, 0);
    end
    sort_req = HOST_IDLE;
    @(negedge clk);
  endtask

  // ---------------------------------------------------------------- annealer
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
    int xs[C], ys[C], init[C], t[C], seen, l;
    rst = 1; sort_req = HOST_IDLE; tsp_req = HOST_IDLE;
    repeat (2) @(negedge clk);
    rst = 0;
    fork
      sort_round(0);
      begin
        for (int i = 0; i < C; i++) begin xs[i] = $urandom_range(0, 200); ys[i] = $urandom_range(0, 200); end
        for (int i = 0; i < C; i++)
          for (int j = 0; j < C; j++)
            D[i][j] = $rtoi($sqrt($itor((xs[i]-xs[j])*(xs[i]-xs[j]) + (ys[i]-ys[j])*(ys[i]-ys[j]))));
        for (int i = 0; i < C; i++)
          for (int j = 0; j < C; j++) twr(i + C*j, D[i][j]);
        for (int i = 0; i < C; i++) init[i] = (i * 5) % C;
        for (int j = 0; j < NS; j++) begin
          for (int i = 0; i < C; i++) twr(C*C + j*(C+1) + i, init[i]);
          twr(C*C + j*(C+1) + C, len_of(init));
        end
        twr(CB, 60);
        while (!tsp_done) @(negedge clk);
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
        $display("count: tour length %0d -> %0d", len_of(init), l);
      end
    join
    // The tree is reset between sorts.
    @(negedge clk);
    rst = 1; @(negedge clk); rst = 0;
    sort_round(1);
    $display("count: scan=%0d markers=%0d keys=%0d cool=%0d early=%0d frozen=%0d redraw=%0d down=%0d up_acc=%0d up_rej=%0d",
             n_scan, n_marker, n_key, n_cool, n_early, n_frozen, n_redraw, n_down, n_upacc, n_uprej);
    checks++; if (n_scan == 0)   begin failures++; $display("FAIL mechanism: scan shift"); end
    checks++; if (n_marker == 0) begin failures++; $display("FAIL mechanism: fill marker"); end
    checks++; if (n_key == 0)    begin failures++; $display("FAIL mechanism: key output"); end
    checks++; if (n_cool == 0)   begin failures++; $display("FAIL mechanism: cooling step"); end
    checks++; if (n_early == 0)  begin failures++; $display("FAIL mechanism: early drop"); end
    checks++; if (n_frozen == 0) begin failures++; $display("FAIL mechanism: frozen end"); end
    checks++; if (n_redraw == 0) begin failures++; $display("FAIL mechanism: pair redraw"); end
    checks++; if (n_down == 0)   begin failures++; $display("FAIL mechanism: downhill swap"); end
    checks++; if (n_upacc == 0)  begin failures++; $display("FAIL mechanism: uphill accepted"); end
    checks++; if (n_uprej == 0)  begin failures++; $display("FAIL mechanism: uphill rejected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
