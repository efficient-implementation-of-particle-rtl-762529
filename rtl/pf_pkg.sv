// pf_pkg: types shared by the particle-filter custom-instruction units.
//
// The resampling units are driven one instruction at a time by the base
// processor. Each instruction is named by an opcode: the reformulated
// systematic-resampling (SR) unit has six, the parallel systematic-resampling
// (PSR) unit four, as listed by the design. The opcode encodings are this
// design's own choice. The UQLE weight-representation choice (low, middle or
// high value of each quantization interval) is also defined here.
package pf_pkg;

  // Reformulated SR instructions.
  typedef enum logic [2:0] {
    SR_CWCALC   = 3'd0,  // cumulative weights of P weights
    SR_PARADEF  = 3'd1,  // U^1 and U_size from CW_N
    SR_BASEADD  = 3'd2,  // r_k = j*u
    SR_CRFCOUNT = 3'd3,  // r_k += number of group-j UDNs below CW_k
    SR_NEXTIT   = 3'd4,  // move to the next UDN group or stop
    SR_RFCALC   = 3'd5   // RFs from cumulative counts
  } sr_op_e;

  // PSR instructions.
  typedef enum logic [1:0] {
    PSR_CWCALC  = 2'd0,  // cumulative weights of P weights
    PSR_PARADEF = 2'd1,  // U^1 from CW_N
    PSR_CRFDIV  = 2'd2,  // CRFs by integer division
    PSR_RFCALC  = 2'd3   // RFs from CRFs
  } psr_op_e;

  // Representative value used for each UQLE interval.
  typedef enum logic [1:0] {
    UQLE_LOW  = 2'd0,
    UQLE_MID  = 2'd1,
    UQLE_HIGH = 2'd2
  } uqle_wmode_e;

endpackage
