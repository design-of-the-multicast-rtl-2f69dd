// mc_sid_alloc: hands out the next available tree memory location (the local
// SID of a new session at this port) and takes back released ones.
//
// Locations never used are given out in order 0, 1, 2, ... from a counter;
// released locations go on a stack and are reused first, most recent first.
// This needs no initialisation pass after reset.  sid/avail show the SID the
// next allocation will return; alloc takes it, release gives free_sid back.
// Allocation and release are not requested in the same cycle by the
// controller; if they are, both happen and the released SID is not lost.
module mc_sid_alloc #(
  parameter int NS = 40
) (
  input  logic                         clk,
  input  logic                         rst_n,
  output logic [mc_pkg::sid_w(NS)-1:0] sid,
  output logic                         avail,
  input  logic                         alloc,
  input  logic                         release_sid,
  input  logic [mc_pkg::sid_w(NS)-1:0] free_sid
);
  localparam int SW = mc_pkg::sid_w(NS);
  localparam int CW = $clog2(NS + 1);

  logic [SW-1:0] stack [NS];
  logic [CW-1:0] sp;      // number of released SIDs on the stack
  logic [CW-1:0] fresh;   // next never-used location

  assign avail = (sp != '0) || (fresh < CW'(NS));
  assign sid   = (sp != '0) ? stack[SW'(sp - 1'b1)] : SW'(fresh);

  // When both happen with a released SID on top of the stack, the released SID
  // simply replaces the one taken; with an empty stack it is pushed.
  logic          st_we;
  logic [CW-1:0] st_addr;

  always_comb begin
    st_we   = release_sid && (sp < CW'(NS) || alloc);
    st_addr = (alloc && avail && sp != '0) ? sp - 1'b1 : sp;
  end

  always_ff @(posedge clk) begin
    if (st_we) stack[SW'(st_addr)] <= free_sid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp    <= '0;
      fresh <= '0;
    end else begin
      if (alloc && avail) begin
        if (sp == '0) fresh <= fresh + 1'b1;
        if (!release_sid && sp != '0) sp <= sp - 1'b1;
        if (release_sid && sp == '0)  sp <= CW'(1);
      end else if (st_we) begin
        sp <= sp + 1'b1;
      end
    end
  end

endmodule
