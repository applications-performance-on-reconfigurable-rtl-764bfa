// tb_subtractive_rand: runs the generator from two seeds and compares the
// first 400 numbers (several table refills) with the software generator
// re-implemented here, including the rejection test and the index mod M.
// Also checks that seeding takes 54 + 7*55 clocks and that a refill holds
// valid low for 55 clocks.
module tb_subtractive_rand;
  logic clk = 0, rst;
  logic next_a, valid_a, ok_a, next_b, valid_b, ok_b, seeded_a, seeded_b;
  logic [30:0] raw_a, raw_b;
  logic [3:0] uni_a;
  logic [2:0] uni_b;
  int checks = 0, failures = 0;

  subtractive_rand #(.SEED(-1000), .M(10)) dut_a (
    .clk, .rst, .next(next_a), .valid(valid_a), .raw(raw_a), .uniform(uni_a), .uniform_ok(ok_a), .seeded(seeded_a));
  subtractive_rand #(.SEED(12345), .M(7)) dut_b (
    .clk, .rst, .next(next_b), .valid(valid_b), .raw(raw_b), .uniform(uni_b), .uniform_ok(ok_b), .seeded(seeded_b));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Software model: A[0] = -1 sentinel, values mod 2^31.
  int A [56];
  int fp;
  function automatic int md(int x, int y); return (x - y) & 32'h7fffffff; endfunction
  function automatic int flip();
    int ii, jj;
    for (ii = 1, jj = 32; jj <= 55; ii++, jj++) A[ii] = md(A[ii], A[jj]);
    for (jj = 1; ii <= 55; ii++, jj++) A[ii] = md(A[ii], A[jj]);
    fp = 54;
    return A[55];
  endfunction
  function automatic void init(int seed);
    int prev, nx, i, dummy;
    A[0] = -1;
    prev = md(seed, 0); seed = prev; nx = 1;
    A[55] = prev;
    for (i = 21; i != 0; i = (i + 21) % 55) begin
      A[i] = nx;
      nx = md(prev, nx);
      if (seed & 1) seed = 32'h40000000 + (seed >>> 1);
      else seed = seed >>> 1;
      nx = md(nx, seed);
      prev = A[i];
    end
    for (i = 0; i < 7; i++) dummy = flip();
  endfunction
  function automatic int random_sw();
    if (A[fp] >= 0) begin fp--; return A[fp+1]; end
    return flip();
  endfunction

  task automatic check(string w, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", w, got, exp);
    end
  endtask

  task automatic run_one(bit which, int seed, int m);
    int cyc, r, stall;
    longint limit;
    limit = 64'h8000_0000 - (64'h8000_0000 % m);
    init(seed);
    @(negedge clk);
    rst = 1; @(negedge clk); rst = 0;
    cyc = 0;
    while (!(which ? valid_b : valid_a)) begin @(negedge clk); cyc++; end
    check("seeding clocks", cyc, 54 + 7*55);
    for (int n = 0; n < 400; n++) begin
      stall = 0;
      while (!(which ? valid_b : valid_a)) begin @(negedge clk); stall++; end
      if (n == 54) check("refill stall", stall, 55);
      r = random_sw();
      check($sformatf("raw %0d", n), which ? raw_b : raw_a, r);
      check("uniform_ok", which ? ok_b : ok_a, longint'(r) < limit);
      check("uniform", which ? uni_b : uni_a, r % m);
      if (which) next_b = 1; else next_a = 1;
      @(negedge clk);
      next_a = 0; next_b = 0;
    end
  endtask

  initial begin
    rst = 1; next_a = 0; next_b = 0;
    @(negedge clk);
    run_one(0, -1000, 10);
    run_one(1, 12345, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
