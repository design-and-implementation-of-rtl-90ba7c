// fir_pkg: types and constants shared by the FIR filter, its multipliers and
// its microprogram controller.
//
// The multipliers are 8 x 8 unsigned, as in the Bi-Recoder partial-product
// figure (a[7:0], b[7:0]); products are 16 bits. The multiplier kind is a
// parameter of every filter: the Bi-Recoder multiplier is the proposed one,
// the reduced complexity Wallace tree is the one it is compared with. The
// microinstruction format is this design's own choice: the source gives the
// filter a microprogrammed controller but not its control word.
package fir_pkg;

  localparam int unsigned DW = 8;       // sample and coefficient width
  localparam int unsigned PW = 2 * DW;  // product width

  typedef enum logic [0:0] {
    MULT_BIRECODER = 1'b0,
    MULT_WALLACE   = 1'b1
  } mult_kind_e;

  // Next-address control of a microinstruction.
  typedef enum logic [1:0] {
    SEQ_NEXT  = 2'd0,  // go to uPC + 1
    SEQ_WAIT  = 2'd1,  // stay until a sample arrives, then uPC + 1
    SEQ_JUMP  = 2'd2   // go to the address field
  } useq_next_e;

  // One microinstruction of the sequential FIR control store.
  typedef struct packed {
    logic       take_sample;  // shift x_data into the delay line (on arrival)
    logic       clr_acc;      // clear the accumulator
    logic       mac;          // acc += coef[tap] * x[tap]
    logic       emit;         // present the accumulator as y, strobe valid
    logic [7:0] tap;          // tap index used by the MAC
    useq_next_e next;         // next-address control
    logic [7:0] addr;         // jump target
  } uinstr_t;

endpackage
