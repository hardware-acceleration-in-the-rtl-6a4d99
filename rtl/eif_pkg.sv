// eif_pkg: constants and helpers shared by the information-filter IP.
//
// The filter keeps every number in signed two's-complement fixed point:
// DW bits in all, of which FW are fraction bits. The defaults (48/24) are
// this design's own choice; the reference C model worked in floating point.
// N_STATES = 4 and N_SENS = 13 are the sizes of the main filter (a four-state
// filter fed by 13 sensor inputs).
package eif_pkg;

  parameter int unsigned DW_DEF   = 48;  // word width
  parameter int unsigned FW_DEF   = 24;  // fraction bits
  parameter int unsigned N_STATES = 4;   // states of the main filter
  parameter int unsigned N_SENS   = 13;  // sensor inputs (rows of H)

  // Phases of one filter iteration, in the order they run.
  typedef enum logic [4:0] {
    PH_IDLE,
    PH_FORM,      // latch the formed F, G, Q, H, R
    PH_FINV,      // F^-1                       (N x N inverse)
    PH_QINV,      // Q^-1                       (N/2 x N/2 inverse)
    PH_IH_VEC,    // i_h = F^-1 i               (eq 2.1)
    PH_T1,        // T1 = I F^-1
    PH_IH_MAT,    // I_h = F^-T T1              (eq 2.2)
    PH_T2,        // T2 = I_h G
    PH_A,         // A = G^T T2 + Q^-1
    PH_AINV,      // A^-1                       (N/2 x N/2 inverse)
    PH_T3,        // T3 = T2 A^-1
    PH_X,         // X = T3 G^T                 (eq 2.3)
    PH_IP_VEC,    // i_p = i_h - X i_h          (eq 2.4)
    PH_IP_MAT,    // I_p = I_h - X I_h          (eq 2.5)
    PH_PINV,      // P = I_p^-1                 (eq 2.6, N x N inverse)
    PH_XOUT,      // x = P i_p                  (eq 2.7)
    PH_RH,        // RH = R H
    PH_RY,        // Ry = R y
    PH_IU_VEC,    // i = i_p + H^T Ry           (eq 2.8)
    PH_IU_MAT,    // I = I_p + H^T RH           (eq 2.9)
    PH_DONE
  } phase_e;

endpackage
