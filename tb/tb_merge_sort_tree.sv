// tb_merge_sort_tree: sorts random key sets with two trees, a 16-leaf tree
// loaded through the scan chain and an 8-leaf tree loaded by address, and
// checks that log2(N)-1 reads return the all-ones marker, that the next N
// reads (one per clock) return the keys in descending order, and that later
// reads return 0. Several rounds with reset in between; includes duplicate
// keys and a 0 key.
module tb_merge_sort_tree;
  import rawcs_pkg::*;
  logic clk = 0, rst;
  host_req_t req_s, req_b;
  logic [31:0] rdata_s, rdata_b;
  int checks = 0, failures = 0;

  merge_sort_tree #(.N(16), .SCAN(1)) dut_s (.clk, .rst, .req(req_s), .rdata(rdata_s));
  merge_sort_tree #(.N(8),  .SCAN(0)) dut_b (.clk, .rst, .req(req_b), .rdata(rdata_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Sort one key set of n keys on the selected tree.
  task automatic run_sort(bit scan, int n, int round);
    logic [31:0] keys[$];
    logic [31:0] got;
    int lg;
    lg = $clog2(n);
    for (int i = 0; i < n; i++) begin
      logic [31:0] k;
      k = $urandom;
      if (k == '1) k = 0;
      if (round == 1) k = k % 5;          // many duplicates
      if (i == 3) k = 0;
      keys.push_back(k);
    end
    @(negedge clk);
    rst = 1; @(negedge clk); rst = 0;
    for (int i = 0; i < n; i++) begin
      host_req_t r;
      r = HOST_IDLE; r.wr = 1; r.wdata = keys[i];
      r.addr = scan ? 24'd2000 : 24'(i);
      if (scan) req_s = r; else req_b = r;
      @(negedge clk);
    end
    req_s = HOST_IDLE; req_b = HOST_IDLE;
    @(negedge clk);
    keys.rsort();
    // Back-to-back reads of the root, one per clock.
    for (int j = 0; j < lg - 1 + n + 2; j++) begin
      host_req_t r;
      r = HOST_IDLE; r.rd = 1; r.addr = 24'(n + 1);
      if (scan) req_s = r; else req_b = r;
      @(negedge clk);
      got = scan ? rdata_s : rdata_b;
      if (j < lg - 1)      check("fill marker", got, '1);
      else if (j < lg - 1 + n) check($sformatf("key %0d", j - lg + 1), got, keys[j-lg+1]);
      else                 check("drained", got, 0);
    end
    req_s = HOST_IDLE; req_b = HOST_IDLE;
  endtask

  initial begin
    rst = 1; req_s = HOST_IDLE; req_b = HOST_IDLE;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int round = 0; round < 4; round++) begin
      run_sort(1, 16, round);
      run_sort(0, 8, round);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
