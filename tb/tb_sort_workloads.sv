// tb_sort_workloads: the merge-sort problem sizes 4, 8, 64 and 256 keys, each
// on a tree built for that size and loaded through the scan chain. For every
// size it checks that exactly log2(N)-1 fill markers (all-ones) come out
// first, then the N keys in descending order on N consecutive reads (one key
// per clock), then 0. Keys are random, nonzero and below the marker value,
// with some repeated values. Expected order comes from a software sort.
module tb_sort_workloads;
  import rawcs_pkg::*;
  logic clk = 0, rst;
  host_req_t req;
  logic [31:0] rd4, rd8, rd64, rd256;
  int checks = 0, failures = 0;

  merge_sort_tree #(.N(4))   u4   (.clk, .rst, .req, .rdata(rd4));
  merge_sort_tree #(.N(8))   u8   (.clk, .rst, .req, .rdata(rd8));
  merge_sort_tree #(.N(64))  u64  (.clk, .rst, .req, .rdata(rd64));
  merge_sort_tree #(.N(256)) u256 (.clk, .rst, .req, .rdata(rd256));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick(int sz);
    case (sz)
      4:  return rd4;
      8:  return rd8;
      64: return rd64;
      default: return rd256;
    endcase
  endfunction

  task automatic run_size(int n);
    logic [31:0] keys[$];
    logic [31:0] got;
    int lg = $clog2(n);
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    for (int i = 0; i < n; i++) keys.push_back((i % 5 == 4) ? keys[i-1] : 1 + ($urandom % 32'hffff_fff0));
    foreach (keys[i]) begin
      req = HOST_IDLE; req.wr = 1; req.addr = 24'd2000; req.wdata = keys[i];
      @(negedge clk);
    end
    keys.rsort();
    // The root of each tree sits at address n+1; only the tree under test is read.
    for (int j = 0; j < lg - 1 + n + 1; j++) begin
      req = HOST_IDLE; req.rd = 1; req.addr = 24'(n + 1);
      @(negedge clk);
      got = pick(n);
      checks++;
      if (j < lg - 1) begin
        if (got != 32'hffff_ffff) begin failures++; $display("FAIL N=%0d marker %0d: %h", n, j, got); end
      end else if (j < lg - 1 + n) begin
        if (got != keys[j-lg+1]) begin failures++; $display("FAIL N=%0d key %0d: %h expected %h", n, j-lg+1, got, keys[j-lg+1]); end
      end else if (got != 0) begin failures++; $display("FAIL N=%0d after last key: %h", n, got); end
    end
    req = HOST_IDLE;
    $display("count: N=%0d sorted in %0d fill reads + %0d key reads", n, lg - 1, n);
  endtask

  initial begin
    rst = 1; req = HOST_IDLE;
    repeat (2) @(negedge clk);
    rst = 0;
    run_size(4);
    run_size(8);
    run_size(64);
    run_size(256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
