// sem_pkg: types and constants shared by the SEM/STEM soft-error mitigation
// blocks.
//
// The STEM recovery sequence follows the document: one cycle to load the R3
// checkpoint back into R1/R2, then two cycles of clock stall for
// re-computation (three-cycle penalty); a Panic costs one stalled cycle in
// which R3 is refreshed from R2. A SEM recovery is a single stalled cycle in
// which R1 is reloaded from R3. The state encodings are this design's choice.
//
// The overclocking modes are the three the document evaluates: no
// overclocking (period fixed at T_Max), maximum overclocking (fixed at
// T_Min) and dynamic overclocking (linear control between the two).
package sem_pkg;

  // Recovery cycles after a STEM Error: 1 load cycle + RECOMP_CYCLES stall.
  localparam int unsigned STEM_RECOMP_CYCLES = 2;

  // Number of steps the T_Max..T_Min period range is divided into.
  localparam int unsigned OC_STEPS = 32;

  typedef enum logic [1:0] {
    STEM_RUN    = 2'd0,  // normal operation, all three clocks running
    STEM_BACKUP = 2'd1,  // Load_Backup: R1,R2 <= R3 ; CLK3 held
    STEM_STALL  = 2'd2,  // re-computation: all pipeline clocks held
    STEM_PANIC  = 2'd3   // Load_Panic: R3 <= R2 ; CLK1, CLK2 held
  } stem_state_e;

  typedef enum logic {
    SEM_RUN    = 1'b0,   // normal operation
    SEM_BACKUP = 1'b1    // LBkup: R1 <= R3 ; CLK2, CLK3 held
  } sem_state_e;

  typedef enum logic [1:0] {
    OC_NOOC  = 2'd0,     // period fixed at T_Max
    OC_MAXOC = 2'd1,     // period fixed at T_Min
    OC_DYNOC = 2'd2      // period adapted to the measured error rate
  } oc_mode_e;

endpackage
