// qca_dft_pkg: types and constants shared by the QCA design-for-test blocks.
//
// Every block in this design is controlled by four control lines:
//   C0, C1  drive the Test Enable voters. C0C1 = 01 or 10 passes the literals
//           (normal mode), 11 forces every literal to 1 (stuck-at-0 test),
//           00 forces every literal to 0 (stuck-at-1 test).
//   U0, U1  are the fixed inputs of the AND-OR voters. U0 feeds the voters that
//           act as AND gates and U1 those that act as OR gates. Normal mode is
//           U0U1 = 01; the tests set 00 (all AND) or 11 (all OR).
// The two test vectors {C0,C1,U0,U1} = 1100 and 0011 follow the scheme this
// design implements. The choice of 0101 as "the" normal vector is this
// design's own (01 and 10 on C0C1 behave the same).
package qca_dft_pkg;

  typedef struct packed {
    logic c0;
    logic c1;
    logic u0;
    logic u1;
  } dft_ctrl_t;

  typedef enum logic [1:0] {
    MODE_NORMAL = 2'd0,
    MODE_SA0    = 2'd1,   // detects stuck-at-0 faults on the data path
    MODE_SA1    = 2'd2    // detects stuck-at-1 faults on the data path
  } dft_mode_t;

  localparam dft_ctrl_t CTRL_NORMAL = '{c0: 1'b0, c1: 1'b1, u0: 1'b0, u1: 1'b1};
  localparam dft_ctrl_t CTRL_SA0    = '{c0: 1'b1, c1: 1'b1, u0: 1'b0, u1: 1'b0};
  localparam dft_ctrl_t CTRL_SA1    = '{c0: 1'b0, c1: 1'b0, u0: 1'b1, u1: 1'b1};

  // Latency of one 1-bit adder: nine clock zones, available after two
  // full four-phase clock cycles.
  localparam int unsigned FA_LATENCY = 2;

  function automatic dft_ctrl_t ctrl_for(dft_mode_t mode);
    unique case (mode)
      MODE_SA0: return CTRL_SA0;
      MODE_SA1: return CTRL_SA1;
      default:  return CTRL_NORMAL;
    endcase
  endfunction

endpackage
