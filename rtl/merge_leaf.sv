// merge_leaf: a leaf register of the merge-sort tree, holding one key.
//
// A key enters the leaf in one of two ways, chosen at build time by SCAN,
// as in the document: with SCAN = 0 the host writes it to the leaf's own
// address ID; with SCAN = 1 all leaves form one shift register and every
// host write to the scan address shifts the chain by one place (scan_en and
// scan_in come from the root node and the previous leaf). When the parent
// takes the key (load), the leaf drops to 0, the "exhausted" value, which
// loses every later comparison. Reset (synchronous) sets all-ones, the
// "not filled" marker.
//
// Interface: host request (address and data for bus loading), scan_en /
// scan_in, load from the parent, out = key register (also the next scan link).
module merge_leaf
  import rawcs_pkg::*;
#(
  parameter int unsigned DW   = 32,
  parameter int unsigned IDW  = 15,
  parameter bit          SCAN = 1'b1,
  parameter int unsigned ID   = 0
) (
  input  logic          clk,
  input  logic          rst,
  input  host_req_t     req,
  input  logic          scan_en,
  input  logic [DW-1:0] scan_in,
  input  logic          load,
  output logic [DW-1:0] out
);

  localparam logic [IDW-1:0] MY_ID = IDW'(ID);

  logic bus_hit;
  assign bus_hit = !SCAN && req.wr && (req.addr[IDW-1:0] == MY_ID);

  always_ff @(posedge clk) begin
    if (rst)
      out <= '1;
    else if (SCAN && scan_en)
      out <= scan_in;
    else if (bus_hit)
      out <= req.wdata[DW-1:0];
    else if (load)
      out <= '0;
  end

endmodule
