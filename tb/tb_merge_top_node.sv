// tb_merge_top_node: self-checking test of the merge-sort root and its host
// decoding. A read of the root address (low 15 bits = ID) loads the root;
// a write to the full scan address raises scan_en and puts the data on the
// chain head; the root register is the read data.
module tb_merge_top_node;
  import rawcs_pkg::*;
  localparam int DW = 32;
  localparam int ID = 17;
  logic clk = 0, rst;
  host_req_t req;
  logic [DW-1:0] in1, in2, scan_out;
  logic read1, read2, scan_en;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  merge_top_node #(.DW(DW), .ID(ID), .SCAN_ID(2000)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
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

  logic [31:0] model;
  logic hit;
  int hits = 0, scans = 0;
  int sel;
  initial begin
    rst = 1; req = HOST_IDLE; in1 = 0; in2 = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    check("reset", rdata, '1);
    model = '1;
    for (int t = 0; t < 1000; t++) begin
      req = HOST_IDLE;
      sel = $urandom_range(0, 3);
      case (sel)
        0: begin req.rd = 1; req.addr = 24'(ID); end
        1: begin req.rd = 1; req.addr = 24'(ID) | 24'h8000 << ($urandom_range(0, 8)); end
        2: begin req.wr = 1; req.addr = ($urandom_range(0, 1) == 0) ? 24'd2000 : 24'd2000 | 24'h8000; end
        default: begin req.rd = $urandom_range(0, 1); req.addr = 24'($urandom_range(0, 3000)); end
      endcase
      req.wdata = $urandom;
      in1 = ($urandom_range(0, 5) == 0) ? '1 : $urandom;
      in2 = ($urandom_range(0, 5) == 0) ? '1 : $urandom;
      #1;
      hit = req.rd && (req.addr[14:0] == 15'(ID));
      hits += int'(hit);
      scans += int'(scan_en);
      check("scan_en", 32'(scan_en), 32'(req.wr && req.addr == 24'd2000));
      check("scan_out", scan_out, req.wr ? req.wdata : 0);
      check("read1", 32'(read1), 32'(hit && (in1 > in2 || in1 == '1)));
      check("read2", 32'(read2), 32'(hit && (in1 <= in2 || in2 == '1)));
      if (in1 == '1 && in2 == '1) model = '1;
      else if (hit) model = (in1 > in2) ? in1 : in2;
      @(negedge clk);
      check("rdata", rdata, model);
    end
    checks++;
    if (hits == 0 || scans == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
