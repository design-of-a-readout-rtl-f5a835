// ipbus_pkg: the IPbus slave bus (virtual A32/D32 bus).
//
// The master drives address, write data, strobe and write; it holds strobe
// until the slave answers with ack (success) or err (failure) for one cycle.
// Read data is valid in the cycle that ack is high.
package ipbus_pkg;

  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] wdata;
    logic        strobe;
    logic        write;
  } ipb_wbus_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        ack;
    logic        err;
  } ipb_rbus_t;

  localparam ipb_wbus_t IPB_WBUS_NULL = '{addr: '0, wdata: '0, strobe: 1'b0, write: 1'b0};

endpackage
