// merge_top_node: the root of the merge-sort tree and its host port.
//
// The root is an ordinary comparator node (merge_node) whose load comes from
// the host: each host read of address ID loads the root, which pulls the next
// key up the tree, and the root register is the read data. The node also
// drives the leaf scan chain: a host write to SCAN_ID raises scan_en for that
// clock and puts the written word on the head of the chain.
//
// Timing: the read data is the root register itself; the host takes it after
// the edge of its read cycle. The first log2(N)-1 reads after loading return
// the all-ones "not filled" marker; after that every read returns the next key
// in descending order, one per clock if the host reads every clock.
// The node address is compared on the low IDW address bits and the scan
// address on the full address, as in the document.
module merge_top_node
  import rawcs_pkg::*;
#(
  parameter int unsigned DW      = 32,
  parameter int unsigned IDW     = 15,
  parameter bit          SCAN    = 1'b1,
  parameter int unsigned ID      = 257,
  parameter int unsigned SCAN_ID = 2000
) (
  input  logic               clk,
  input  logic               rst,
  input  host_req_t          req,
  input  logic [DW-1:0]      in1,
  input  logic [DW-1:0]      in2,
  output logic               read1,
  output logic               read2,
  output logic               scan_en,
  output logic [DW-1:0]      scan_out,
  output logic [HOST_DW-1:0] rdata
);

  logic          hit;
  logic [DW-1:0] root;

  assign hit      = req.rd && (req.addr[IDW-1:0] == IDW'(ID));
  assign scan_en  = SCAN && req.wr && (req.addr == HOST_AW'(SCAN_ID));
  assign scan_out = req.wr ? req.wdata[DW-1:0] : '0;
  assign rdata    = HOST_DW'(root);

  merge_node #(.DW(DW)) u_root (
    .clk, .rst, .load(hit), .in1, .in2, .read1, .read2, .out(root)
  );

endmodule
