// Message and tree-entry types of the multicast controller.  Included inside a
// module body that has integer parameters N (ports) and NS (sessions per port).
localparam int IDX_W = mc_pkg::idx_w(N);
localparam int ID_W  = mc_pkg::id_w(N);
localparam int SID_W = mc_pkg::sid_w(NS);
localparam int FW    = mc_pkg::fan_w(N);
localparam int L     = mc_pkg::msg_len(N, NS);
localparam int MW    = mc_pkg::entry_w(N, NS);

// Control message (most significant field first)
typedef struct packed {
  mc_pkg::msg_type_e mtype;
  logic [SID_W-1:0]  dst_sid;
  logic [ID_W-1:0]   dst_id;
  logic [SID_W-1:0]  src_sid;   // "Port SID"
  logic [ID_W-1:0]   src_id;    // "Port ID"
  logic [ID_W-1:0]   info;      // "Remove message info"
} mc_msg_t;

// Tree memory entry (most significant field first)
typedef struct packed {
  logic [FW-1:0]    f_right;
  logic [FW-1:0]    f_left;
  logic [SID_W-1:0] par_sid;
  logic [IDX_W-1:0] par_idx;
  logic [SID_W-1:0] left_sid;
  logic [IDX_W-1:0] left_idx;
  logic [SID_W-1:0] right_sid;
  logic [IDX_W-1:0] right_idx;
} mc_entry_t;

// Output FIFO word: destination port ID for the cross-bar plus the message
typedef struct packed {
  logic [ID_W-1:0] dest;
  mc_msg_t         msg;
} mc_out_t;
