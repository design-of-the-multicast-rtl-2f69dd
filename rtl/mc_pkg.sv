// mc_pkg: constants, message-type encoding and field-width functions shared by
// every block of the multicast tree controller.
//
// A port controller exchanges fixed-length control messages (type, destination
// SID/ID, source SID/ID, one extra information field).  The widths of these
// fields follow from the number of router ports N and the number of sessions
// per port NS; the functions below give them so that module headers can size
// their ports from the same two parameters.
//
// Port IDs in messages run from 1 to N and take clog2(N)+1 bits, 0 meaning
// "no port".  Inside the tree memory a port is kept as its index ID-1 in
// clog2(N) bits, as the document's entry-width formula counts it.  The branch
// fanout field is clog2(N/2+1) bits wide: the largest fanout is N/2, which the
// document's clog2(N/2) bits cannot hold, so this is one bit wider than the
// document's formula for power-of-two N.
package mc_pkg;

  // Eight message types.  Type 8 (forward a data packet) is encoded as 0 and
  // is not processed by the controller.
  typedef enum logic [2:0] {
    MT_DATA            = 3'd0,  // 8: forward data packet to children (ignored)
    MT_ALLOC           = 3'd1,  // 1: allocate memory for a new port
    MT_ADD             = 3'd2,  // 2: find where to add the new port and add it
    MT_FIND_REPL       = 3'd3,  // 3: find a replacement for the leaving port
    MT_REQ_ENTRY       = 3'd4,  // 4: send entry to replacement, release memory
    MT_CHG_CHILD_REPL  = 3'd5,  // 5: change child of the replacement port
    MT_CHG_PARENT      = 3'd6,  // 6: change parent
    MT_CHG_CHILD_PAR   = 3'd7   // 7: change child of the leaving port's parent
  } msg_type_e;

  localparam int N_TYPE      = 8;  // number of message types
  localparam int SLOT_CYCLES = 6;  // clock cycles per cell time slot
  localparam int FIFO_DEPTH  = 128;

  function automatic int idx_w(input int n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  function automatic int id_w(input int n);
    return idx_w(n) + 1;
  endfunction

  function automatic int sid_w(input int ns);
    return (ns > 1) ? $clog2(ns) : 1;
  endfunction

  function automatic int fan_w(input int n);
    return $clog2(n / 2 + 1);
  endfunction

  // Message length: ceil(log2 Ntype) + 2 ceil(log2 Ns) + 3 (ceil(log2 N) + 1)
  function automatic int msg_len(input int n, input int ns);
    return $clog2(N_TYPE) + 2 * sid_w(ns) + 3 * id_w(n);
  endfunction

  // Tree memory entry: 3 port indices, 3 SIDs, 2 fanouts
  function automatic int entry_w(input int n, input int ns);
    return 3 * idx_w(n) + 3 * sid_w(ns) + 2 * fan_w(n);
  endfunction

endpackage
