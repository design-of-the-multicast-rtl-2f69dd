// mc_tree_mem: the tree memory of one port.
//
// One entry per multicast session passing the port, addressed by the session's
// local identifier (SID).  An entry holds the two branch fanouts and the SID
// and port index of the parent and of the left and right child (see the
// mc_entry_t layout in mc_types.svh); its width is
// 3 clog2(N) + 3 clog2(NS) + 2 clog2(N/2+1) bits.
//
// A simple dual-port RAM as an FPGA block memory provides it: the read is
// synchronous (address in one cycle, data the next), one write per cycle.
// Entries are not cleared at reset; the controller writes an entry completely
// when it allocates it and reads only allocated entries.
module mc_tree_mem #(
  parameter int N  = 8,
  parameter int NS = 40
) (
  input  logic                              clk,
  input  logic [mc_pkg::sid_w(NS)-1:0]      raddr,
  output logic [mc_pkg::entry_w(N, NS)-1:0] rdata,
  input  logic                              we,
  input  logic [mc_pkg::sid_w(NS)-1:0]      waddr,
  input  logic [mc_pkg::entry_w(N, NS)-1:0] wdata
);
  localparam int MW = mc_pkg::entry_w(N, NS);

  logic [MW-1:0] mem [NS];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < NS) mem[waddr] <= wdata;
    rdata <= (int'(raddr) < NS) ? mem[raddr] : '0;
  end

endmodule
