// eccp_pkg -- types and constants of the ECC processor.
//
// pd_cmd_t : commands from the control unit to the point addition/doubling unit.
//   PD_LOAD  initialise the ladder from the base point: (X1,Z1) = (x,1),
//            (X2,Z2) = (x^4 + b, x^2), i.e. P and 2P in projective x-only form.
//   PD_STEP  one Montgomery ladder step for key bit k_i.
// Register-file addresses of the ladder state and the BRAM memory map (one
// m-bit word per address) are fixed here as well.
package eccp_pkg;

  typedef enum logic [0:0] {PD_LOAD = 1'b0, PD_STEP = 1'b1} pd_cmd_t;

  // ladder registers
  localparam logic [1:0] R_X1 = 2'd0;
  localparam logic [1:0] R_Z1 = 2'd1;
  localparam logic [1:0] R_X2 = 2'd2;
  localparam logic [1:0] R_Z2 = 2'd3;

  // BRAM word addresses
  localparam int unsigned BRAM_DEPTH = 8;
  localparam logic [2:0] A_K  = 3'd0;   // scalar k
  localparam logic [2:0] A_PX = 3'd1;   // base point x
  localparam logic [2:0] A_PY = 3'd2;   // base point y
  localparam logic [2:0] A_QX = 3'd3;   // result x_k
  localparam logic [2:0] A_QY = 3'd4;   // result y_k

endpackage
