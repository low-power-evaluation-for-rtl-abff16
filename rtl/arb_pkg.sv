// arb_pkg: types and constants shared by the arbiter configurations.
//
// tdm_impl_e selects how a TDM slot pointer is built: a binary counter
// followed by a decoder, or a one-hot ring counter (a rotating shift
// register) that needs no decoder. arb_cfg_e numbers the arbiter
// configurations that the top instantiates side by side, so that their
// request and grant vectors can be carried in one packed array.
package arb_pkg;

  typedef enum logic {
    TDM_COUNTER = 1'b0,  // binary counter + decoder
    TDM_RING    = 1'b1   // one-hot ring counter (shift register)
  } tdm_impl_e;

  // Arbiter configurations instantiated by lpe_top, one request/grant lane each.
  typedef enum logic [2:0] {
    ARB_RR         = 3'd0,  // round-robin, priority register clocked every cycle
    ARB_RR_CG      = 3'd1,  // round-robin, priority register clock-gated
    ARB_TDM_CNT    = 3'd2,  // TDM, binary counter version
    ARB_TDM_RING   = 3'd3,  // TDM, shift-register (ring counter) version
    ARB_TDM_RR     = 3'd4,  // TDM + RR, non-gated
    ARB_TDM_RR_CG  = 3'd5,  // TDM + RR, clock-gated
    ARB_TDM_SUBRR  = 3'd6   // TDM + subset(RR)
  } arb_cfg_e;

  localparam int unsigned NUM_ARB_CFG = 7;

endpackage
