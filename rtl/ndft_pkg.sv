// ndft_pkg: types shared by the nonscan-DFT data paths.
//
// The data paths in this library are register-transfer-level filter data paths in the
// dedicated register-file model: every register feeds exactly one execution unit (EXU),
// while an EXU may feed any number of registers. The controller that sequences them is
// not part of the library, so its outputs (multiplexor selects and register loads) are
// gathered here into one control word per data path and brought out as ports.
//
// Test-mode convention (shared by every test multiplexor): ntest = 0 selects the
// functional path, ntest = 1 the test path. In normal operation ntest is held at 0.
package ndft_pkg;

  // Operand multiplexor codes of the two adders of iir_cascade_dp.
  typedef enum logic [1:0] {LA2_M3 = 2'd0, LA2_M1 = 2'd1, LA2_A1 = 2'd2, LA2_A2 = 2'd3} la2_sel_e;
  typedef enum logic [1:0] {RA2_M2 = 2'd0, RA2_M1 = 2'd1, RA2_A1 = 2'd2, RA2_A2 = 2'd3} ra2_sel_e;
  typedef enum logic [1:0] {LA1_M2 = 2'd0, LA1_M1 = 2'd1, LA1_A2 = 2'd2, LA1_A1 = 2'd3} la1_sel_e;
  typedef enum logic [1:0] {RA1_M2 = 2'd0, RA1_M1 = 2'd1, RA1_A1 = 2'd2, RA1_A2 = 2'd3} ra1_sel_e;

  // Control word of the fourth-order IIR cascade data path (iir_cascade_dp).
  // The register names are those of the data path: LMx is the operand register of
  // multiplier Mx, LAx/RAx the left/right operand registers of adder Ax, TUx the
  // transfer-unit registers that carry values from one filter iteration to the next.
  typedef struct packed {
    // register loads (1 = load, 0 = hold)
    logic       ld_lm1;
    logic       ld_lm2;
    logic       ld_lm3;
    logic       ld_la1;
    logic       ld_ra1;
    logic       ld_la2;
    logic       ld_ra2;
    logic       ld_out;
    logic [3:0] ld_tu;    // bit i loads TU(i+1)
    // operand multiplexor selects
    logic       sel_lm1;  // LM1 <- 0: TU1, 1: TU3
    logic       sel_lm2;  // LM2 <- 0: TU2, 1: TU4
    logic       sel_k1;   // M1 coefficient 0: K1, 1: K3
    logic       sel_k2;   // M2 coefficient 0: K2, 1: K4
    la2_sel_e   sel_la2;
    ra2_sel_e   sel_ra2;
    la1_sel_e   sel_la1;
    ra1_sel_e   sel_ra1;
  } cas_ctrl_t;

  // Register-file read selects of the EWF adder slice (ewf_a2_slice).
  typedef enum logic       {RD_L1 = 1'b0, RD_L2 = 1'b1} lsel_e;
  typedef enum logic [1:0] {RD_R1 = 2'd0, RD_R2 = 2'd1, RD_R3 = 2'd2, RD_R4 = 2'd3} rsel_e;

endpackage
