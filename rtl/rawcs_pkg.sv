// rawcs_pkg: types and constants shared by the two computation structures.
//
// Both structures hang off the same kind of host bus: a memory-mapped bus with
// a 24-bit address and 32-bit data, on which the host writes operands into
// registers of the structure and reads results back. A request is one clock
// wide: rd or wr high for one cycle with the address (and, for a write, the
// data). Read data is combinational from the addressed register and is taken
// by the host after the clock edge that ends the read cycle, so a read that
// also advances the structure (the sorter's root) returns the advanced value.
// The widths follow the document's host interface; the one-cycle strobe
// protocol is this design's own choice.
package rawcs_pkg;

  localparam int unsigned HOST_AW = 24;  // host address width
  localparam int unsigned HOST_DW = 32;  // host data width

  typedef struct packed {
    logic                 rd;    // read strobe, one clock
    logic                 wr;    // write strobe, one clock
    logic [HOST_AW-1:0]   addr;  // word address
    logic [HOST_DW-1:0]   wdata; // write data
  } host_req_t;

  localparam host_req_t HOST_IDLE = '{rd: 1'b0, wr: 1'b0, addr: '0, wdata: '0};

endpackage
