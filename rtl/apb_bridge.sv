// apb_bridge: connects the processing system's APB port to the control bus
// as a master.
//
// Purely combinational translation: in the APB access phase (psel and
// penable) the bridge raises the control bus read or write strobe, and
// APB pready follows the bus ready (inverted, the bus ready is active
// low), so bus wait states become APB wait states. Read data passes
// straight through. No error response is generated (pslverr is 0).
module apb_bridge #(
  parameter int unsigned AW = 16
) (
  input  logic          psel,
  input  logic          penable,
  input  logic          pwrite,
  input  logic [AW-1:0] paddr,
  input  logic [31:0]   pwdata,
  output logic [31:0]   prdata,
  output logic          pready,
  output logic          pslverr,
  // control bus master
  output logic [AW-1:0] bus_addr,
  output logic [31:0]   bus_wdata,
  output logic          bus_read,
  output logic          bus_write,
  input  logic [31:0]   bus_rdata,
  input  logic          bus_ready_n
);
  assign bus_addr  = paddr;
  assign bus_wdata = pwdata;
  assign bus_write = psel && penable && pwrite;
  assign bus_read  = psel && penable && !pwrite;
  assign prdata    = bus_rdata;
  assign pready    = !bus_ready_n;
  assign pslverr   = 1'b0;
endmodule
