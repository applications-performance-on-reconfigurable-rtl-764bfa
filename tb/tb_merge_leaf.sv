// tb_merge_leaf: self-checking test of the merge-sort leaf register in both
// loading modes. The bus-mode leaf (SCAN = 0, ID = 5) must take a write only
// to its own address; the scan-mode leaf must take scan_in only when scan_en
// is high and ignore bus writes; both drop to 0 when their parent loads and
// reset to all-ones.
module tb_merge_leaf;
  import rawcs_pkg::*;
  localparam int DW = 16;
  logic clk = 0, rst;
  host_req_t req;
  logic scan_en, load;
  logic [DW-1:0] scan_in, out_bus, out_scan;
  int checks = 0, failures = 0;

  merge_leaf #(.DW(DW), .SCAN(0), .ID(5)) dut_bus (
    .clk, .rst, .req, .scan_en, .scan_in, .load, .out(out_bus));
  merge_leaf #(.DW(DW), .SCAN(1), .ID(5)) dut_scan (
    .clk, .rst, .req, .scan_en, .scan_in, .load, .out(out_scan));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic [DW-1:0] m_bus, m_scan;
  initial begin
    rst = 1; req = HOST_IDLE; scan_en = 0; scan_in = 0; load = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    check("bus reset", out_bus, '1);
    check("scan reset", out_scan, '1);
    m_bus = '1; m_scan = '1;
    for (int t = 0; t < 1000; t++) begin
      req       = HOST_IDLE;
      req.wr    = $urandom_range(0, 2) == 0;
      req.addr  = ($urandom_range(0, 1) == 0) ? 24'd5 : 24'($urandom_range(0, 40000));
      req.wdata = $urandom;
      scan_en   = $urandom_range(0, 3) == 0;
      scan_in   = DW'($urandom);
      load      = $urandom_range(0, 3) == 0;
      // Reference: the low 15 address bits select the leaf.
      if (req.wr && req.addr[14:0] == 15'd5) m_bus = req.wdata[DW-1:0];
      else if (load) m_bus = '0;
      if (scan_en) m_scan = scan_in;
      else if (load) m_scan = '0;
      @(negedge clk);
      check("bus leaf", out_bus, m_bus);
      check("scan leaf", out_scan, m_scan);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
