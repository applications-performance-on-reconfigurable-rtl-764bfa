// tb_tsp_control: drives the cooling-schedule controller with stand-in
// annealing modules (idle flags, accept pulses, tour lengths and tours set by
// the testbench) and checks:
//  - a full linear schedule T = 5,4,3,2 held TRIES_PER_T*CITIES clocks each,
//    ending when T would reach T_FINAL, with T readable during the run;
//  - the result phase waits for all modules to be idle, then returns the
//    shortest length and that module's tour;
//  - more than ACCEPTS_PER_T*CITIES accepts drop T early (every 5 clocks
//    with two modules accepting every clock);
//  - a temperature with no accepted swap ends the run;
//  - a start temperature at or below T_FINAL runs nothing.
module tb_tsp_control;
  import rawcs_pkg::*;
  localparam int NS = 2, C = 4, CW = 2, TR = 5, AC = 2, BASE = 50;
  localparam int TICKS = TR * C;
  logic clk = 0, rst;
  host_req_t req;
  logic [31:0] rdata, temp;
  logic run, done, ev_cool, ev_early, ev_frozen;
  logic [NS-1:0] idle, accepted;
  logic ready = 1;
  logic [31:0] cur_dist [NS];
  logic [CW-1:0] orders [NS][C];
  int checks = 0, failures = 0;

  tsp_control #(.NUM_SA(NS), .CITIES(C), .DW(32), .TRIES_PER_T(TR), .ACCEPTS_PER_T(AC),
                .COOL_RATE(1), .T_FINAL(1), .BASE(BASE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
  always @(posedge clk) begin
    n_cool   += int'(ev_cool);
    n_early  += int'(ev_early);
    n_frozen += int'(ev_frozen);
  end

  task automatic host_write(int a, int d);
    req = HOST_IDLE; req.wr = 1; req.addr = 24'(a); req.wdata = d;
    @(negedge clk);
    req = HOST_IDLE;
  endtask
  task automatic host_peek(input int a, output logic [31:0] v);
    req = HOST_IDLE; req.rd = 1; req.addr = 24'(a);
    #1;
    v = rdata;
  endtask

  task automatic finish_and_check(int best, int who);
    int w;
    logic [31:0] v;
    idle = '0;
    repeat (10) @(negedge clk);
    check("no result before modules idle", done, 0);
    idle = '1;
    w = 0;
    while (!done) begin @(negedge clk); w++; end
    check("result latency", w, 2);
    host_peek(BASE, v);
    check("best length", v, best);
    for (int i = 0; i < C; i++) begin
      host_peek(BASE + 1 + i, v);
      check("best tour", v, orders[who][i]);
    end
    req = HOST_IDLE;
  endtask

  initial begin
    int runclk, tlog[$], tprev, gap;
    logic [31:0] pv;
    rst = 1; req = HOST_IDLE; idle = '1; accepted = '0;
    cur_dist[0] = 300; cur_dist[1] = 200;
    orders[0] = '{0, 1, 2, 3}; orders[1] = '{3, 1, 0, 2};
    repeat (2) @(negedge clk);
    rst = 0;

    // 1: full linear schedule.
    host_write(BASE, 5);
    idle = '0;
    runclk = 0; tprev = 5;
    while (run) begin
      accepted = (runclk % 4 == 0) ? 2'b01 : 2'b00;
      host_peek(BASE, pv);
      check("T readable", pv, temp);
      req = HOST_IDLE;
      @(negedge clk);
      runclk++;
      if (temp != tprev) begin tlog.push_back(runclk); tprev = temp; end
    end
    accepted = '0;
    check("run clocks", runclk, 4 * TICKS);
    check("temperature steps", tlog.size(), 4);
    for (int i = 0; i < tlog.size(); i++) check("step time", tlog[i], (i + 1) * TICKS);
    check("cool events", n_cool, 3);
    finish_and_check(200, 1);

    // 2: early drops, then a frozen end.
    cur_dist[0] = 150;
    host_write(BASE, 10);
    accepted = '1;
    gap = 0; tprev = 10; tlog.delete();
    for (int i = 1; i <= 15; i++) begin
      @(negedge clk);
      if (temp != tprev) begin tlog.push_back(i); tprev = temp; end
    end
    check("early drops", tlog.size(), 3);
    for (int i = 0; i < tlog.size(); i++) check("early step time", tlog[i], (i + 1) * 5);
    check("early events", n_early, 3);
    accepted = '0;
    runclk = 0;
    while (run) begin @(negedge clk); runclk++; end
    check("frozen after one quiet period", runclk, TICKS);
    check("frozen events", n_frozen, 1);
    check("T cleared", temp, 0);
    finish_and_check(150, 0);

    // 3: start temperature not above T_FINAL.
    host_write(BASE, 1);
    check("no run", run, 0);
    finish_and_check(150, 0);

    $display("count: cool=%0d early=%0d frozen=%0d", n_cool, n_early, n_frozen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
