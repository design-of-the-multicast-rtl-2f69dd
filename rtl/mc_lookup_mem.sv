// mc_lookup_mem: translates a router session ID (RSID) to this port's local SID.
//
// The RSID is the pair (root port, root port's SID); it names a session
// uniquely inside the router and is much shorter than its IP multicast
// address.  The memory is indexed directly by {root port index, root SID}, so
// it has N * 2^clog2(NS) words of one valid bit and one local SID (512 x 7
// bits for 8 ports and 40 sessions, one FPGA block RAM).
//
// Read is synchronous: the key is given in one cycle and valid/SID appear the
// next.  A write either inserts (set = 1) or clears (set = 0) the word of a key.
// The valid bits are flip-flops cleared by reset, so the memory starts empty.
module mc_lookup_mem #(
  parameter int N  = 8,
  parameter int NS = 40
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  input  logic [mc_pkg::idx_w(N)+mc_pkg::sid_w(NS)-1:0] raddr,
  output logic                                          rvalid,
  output logic [mc_pkg::sid_w(NS)-1:0]                  rsid,
  input  logic                                          we,
  input  logic                                          wset,
  input  logic [mc_pkg::idx_w(N)+mc_pkg::sid_w(NS)-1:0] waddr,
  input  logic [mc_pkg::sid_w(NS)-1:0]                  wsid
);
  localparam int KW    = mc_pkg::idx_w(N) + mc_pkg::sid_w(NS);
  localparam int DEPTH = 1 << KW;

  logic [mc_pkg::sid_w(NS)-1:0] sid_mem [DEPTH];
  logic [DEPTH-1:0]             valid;

  always_ff @(posedge clk) begin
    if (we && wset) sid_mem[waddr] <= wsid;
    rsid <= sid_mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= DEPTH'(0);
      rvalid <= 1'b0;
    end else begin
      if (we) valid[waddr] <= wset;
      rvalid <= valid[raddr];
    end
  end

endmodule
