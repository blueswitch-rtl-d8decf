// Shared types and constants of the switch.
//
// The lookup key, the per-packet metadata that travels with a header through
// the flow-table pipeline, the action word stored in the action RAMs, the
// forwarding result handed to the marshallers and the configuration command
// sent from the register interface to the tables are all defined here.
//
// Port count (four 10GbE ports plus the DMA port), the number of flow tables
// (three, i.e. six TCAMs in double-buffered pairs), the TCAM depth of 32 and
// the 64-bit stream width follow the document. The matched fields, the
// version width and the encodings are this design's choices.
package bs_pkg;

  localparam int unsigned NUM_PORTS  = 5;   // ports 0..3: 10GbE, port 4: DMA
  localparam int unsigned NUM_TABLES = 3;   // 6 TCAMs, two per table
  localparam int unsigned ENTRIES    = 32;  // TCAM depth
  localparam int unsigned ENTRY_W    = $clog2(ENTRIES);
  localparam int unsigned AXIS_W     = 64;
  localparam int unsigned KEEP_W     = AXIS_W / 8;
  localparam int unsigned PORT_W     = $clog2(NUM_PORTS);
  localparam int unsigned NT_W       = $clog2(NUM_TABLES + 1); // table id, NUM_TABLES = "done"
  localparam int unsigned VER_W      = 8;

  // Lookup key, 224 bits, seven 32-bit register words.
  typedef struct packed {
    logic [7:0]  in_port;
    logic [47:0] eth_dst;
    logic [47:0] eth_src;
    logic [15:0] eth_type;
    logic [7:0]  ip_proto;
    logic [31:0] ip_src;
    logic [31:0] ip_dst;
    logic [15:0] l4_src;
    logic [15:0] l4_dst;
  } key_t;
  localparam int unsigned KEY_W   = $bits(key_t);
  localparam int unsigned KEY_WORDS = (KEY_W + 31) / 32;

  // Metadata that travels with each header (dashed lines in the datapath).
  typedef struct packed {
    logic [PORT_W-1:0]    in_port;
    logic [VER_W-1:0]     version;    // V_p stamped at the pipeline entrance
    logic [NT_W-1:0]      next_table; // table that still has to match
    logic                 drop;
    logic                 out_valid;  // an Output action has been applied
    logic [NUM_PORTS-1:0] out_mask;
    logic                 flush;      // commit token from the inactivity timer
  } meta_t;

  typedef struct packed {
    meta_t meta;
    key_t  key;
  } hdr_t;

  // Action word of one TCAM entry.
  typedef struct packed {
    logic                 out_valid;
    logic [NUM_PORTS-1:0] out_mask;
    logic                 drop;
    logic                 goto_valid;
    logic [NT_W-1:0]      goto_table;
  } act_t;
  localparam int unsigned ACT_W = $bits(act_t);

  // Forwarding result for one packet, delivered to its input port's marshaller.
  typedef struct packed {
    logic [PORT_W-1:0]    in_port;
    logic                 drop;
    logic [NUM_PORTS-1:0] out_mask;
  } res_t;

  typedef enum logic [1:0] {
    CFG_WRITE  = 2'd0,  // write value/mask/action of one entry
    CFG_CLEAR  = 2'd1,  // invalidate one entry
    CFG_ENDTXN = 2'd2   // end of this table's transaction: Open -> Primed
  } cfg_op_e;

  typedef struct packed {
    logic              valid;
    cfg_op_e           op;
    logic [NT_W-1:0]   table_id;
    logic [ENTRY_W-1:0] addr;
    key_t              value;
    key_t              mask;
    act_t              action;
  } cfg_t;

  // One 64-bit stream beat.
  typedef struct packed {
    logic [AXIS_W-1:0] data;
    logic [KEEP_W-1:0] keep;
    logic              last;
  } beat_t;
  localparam int unsigned BEAT_W = $bits(beat_t);

  // Final forwarding decision from the metadata at the pipeline exit:
  // drop wins; else the Output mask; else flood to every port but the input.
  function automatic res_t make_result(meta_t m);
    res_t r;
    r.in_port = m.in_port;
    r.drop    = m.drop;
    if (m.drop)           r.out_mask = '0;
    else if (m.out_valid) r.out_mask = m.out_mask;
    else                  r.out_mask = ~(NUM_PORTS'(1) << m.in_port);
    if (!m.drop && r.out_mask == '0) r.drop = 1'b1;
    return r;
  endfunction

endpackage
