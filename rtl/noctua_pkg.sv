// noctua_pkg: types and constants shared by the NOCTUA accelerator RTL.
//
// The accelerator is a 4x4 mesh of tiles. Every NoC transfer is a single flit
// that carries its own header (destination bitmask or memory bank, packet type,
// SRAM/memory address) and one 32-lane INT8 vector as payload, so a flit is a
// complete packet. The mesh size and the 32x32 systolic array follow the
// document (4x4 mesh, 16384 MAC units); the flit layout, the packet types and
// the command descriptors are this design's own choices.
package noctua_pkg;

  localparam int MESH  = 4;              // mesh is MESH x MESH tiles
  localparam int NODES = MESH * MESH;    // 16 tiles
  localparam int VEC   = 32;             // lanes per vector, systolic array size
  localparam int VW    = VEC * 8;        // payload width in bits (32 x INT8)
  localparam int AW    = 16;             // address field width

  typedef logic [VW-1:0] vec_t;

  // Router port numbering
  localparam int P_LOCAL = 0;
  localparam int P_NORTH = 1;
  localparam int P_EAST  = 2;
  localparam int P_SOUTH = 3;
  localparam int P_WEST  = 4;
  localparam int NPORTS  = 5;

  typedef enum logic [2:0] {
    PKT_DATA   = 3'd0,   // write payload into the Data SRAM of every destination
    PKT_WEIGHT = 3'd1,   // write payload into the Weight SRAM of every destination
    PKT_CMD    = 3'd2,   // payload holds a pe_cmd_t for the PE controller
    PKT_RESULT = 3'd3,   // result vector written into a data memory bank
    PKT_DONE   = 3'd4    // PE reports completion of its command
  } pkt_type_e;

  typedef struct packed {
    logic [NODES-1:0] dst;      // destination tiles (bitmask, multicast)
    logic             to_mem;   // 1: destination is a data memory bank
    logic [1:0]       bank;     // data memory bank (mesh row) when to_mem
    pkt_type_e        ptype;
    logic [3:0]       src;      // sending tile
    logic [AW-1:0]    addr;     // SRAM row or memory row
    vec_t             data;
  } flit_t;

  typedef enum logic [1:0] {
    OP_MATMUL    = 2'd0,
    OP_SOFTMAX   = 2'd1,
    OP_LAYERNORM = 2'd2
  } op_e;

  typedef enum logic [0:0] {
    POST_NONE = 1'b0,
    POST_GELU = 1'b1
  } post_e;

  // Command carried in the payload of a PKT_CMD flit
  typedef struct packed {
    op_e           op;
    post_e         post;
    logic [4:0]    shift;     // MATMUL: requantisation right shift; LN: output left shift
    logic [AW-1:0] len;       // MATMUL: K (rows of Data/Weight SRAM); SOFTMAX/LN: row length L
    logic          acc_first; // MATMUL: clear the accumulators before this K chunk
    logic          acc_last;  // MATMUL: last K chunk, drain and send the results
    logic [1:0]    out_bank;  // data memory bank for the results
    logic [AW-1:0] out_addr;  // first data memory row for the results
    logic [15:0]   ln_recip;  // bf16 1/L for the layer normalisation mean
    logic [15:0]   ln_eps;    // bf16 delta of Eq. (2)
  } pe_cmd_t;

  // Operation descriptor given to the central controller
  typedef struct packed {
    op_e           op;
    post_e         post;
    logic [4:0]    shift;
    logic [1:0]    a_bank;    // data memory bank holding A (or X)
    logic [AW-1:0] a_base;
    logic [1:0]    w_bank;    // weight memory bank holding W (or gamma/beta)
    logic [AW-1:0] w_base;
    logic [1:0]    o_bank;    // data memory bank for the result
    logic [AW-1:0] o_base;
    logic [7:0]    m_tiles;   // rows of A in units of VEC
    logic [AW-1:0] k_len;     // K for MATMUL, row length L otherwise
    logic [7:0]    n_tiles;   // columns of W in units of VEC (MATMUL)
    logic [15:0]   ln_recip;
    logic [15:0]   ln_eps;
  } cmd_t;

  function automatic logic signed [7:0] lane8(vec_t v, int i);
    return v[i*8 +: 8];
  endfunction

endpackage
