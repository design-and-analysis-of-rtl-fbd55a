// sa_pkg: widths, element types and the command format shared by the blocks of
// the weight-stationary systolic-array accelerator.
//
// The 8-bit data/weight width and the 16-bit accumulator width are those of the
// MAC cell's ports. The command layout is this design's own: it tells the
// controller in the top module which step of a layer to perform.
package sa_pkg;

  localparam int unsigned DATA_W = 8;    // pixels, activations and weights
  localparam int unsigned ACC_W  = 16;   // accumulator / partial sum width
  localparam int unsigned CMD_W  = 16;   // width of address and count fields

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ACC_W-1:0]  acc_t;

  // Operations the controller of the accelerator carries out.
  typedef enum logic [1:0] {
    OP_LOAD_W = 2'd0,   // shift N weight rows from the weight queue into the array
    OP_RUN    = 2'd1    // stream vectors from the activation cache through the array
  } op_e;

  typedef struct packed {
    op_e              op;
    logic [CMD_W-1:0] src_base;    // first cache word read (OP_RUN)
    logic [CMD_W-1:0] src_stride;  // word step between input vectors
    logic [CMD_W-1:0] nvec;        // number of input vectors (>= 1)
    logic             accumulate;  // add into the accumulator bank instead of overwriting
    logic             write_back;  // also write results into the activation cache
    logic [CMD_W-1:0] dst_base;    // first cache word written
    logic [CMD_W-1:0] dst_stride;  // word step between written results
  } cmd_t;

endpackage
