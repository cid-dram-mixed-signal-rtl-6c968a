// vmm_pkg: sizes, types and helper functions shared by the CID/DRAM vector-matrix
// multiplier. The array size (512 columns, 128 binary rows) and the 6-bit ADC follow the
// prototype chip. The matrix and input word lengths I_BITS and J_BITS are this design's
// choice: the prototype's values are not given, so the I = J = 4 example is used.
package vmm_pkg;
  localparam int unsigned COLS_D     = 512;  // N: cells along one output line
  localparam int unsigned ROWS_D     = 128;  // M*I binary rows, one ADC each
  localparam int unsigned I_BITS_D   = 4;    // bits per matrix element
  localparam int unsigned J_BITS_D   = 4;    // bits per input element
  localparam int unsigned ADC_BITS_D = 6;    // flash ADC resolution

  // Operations on the array that compete with refresh.
  typedef enum logic [1:0] {
    OP_WRITE   = 2'd0,  // write the loaded even/odd registers into a row
    OP_READ    = 2'd1,  // sense a row into the even/odd registers (test readout)
    OP_COMPUTE = 2'd2   // drive the input lines once and sample all ADCs
  } op_e;

  // Column parity of a half row.
  typedef enum logic {PAR_EVEN = 1'b0, PAR_ODD = 1'b1} par_e;
endpackage
