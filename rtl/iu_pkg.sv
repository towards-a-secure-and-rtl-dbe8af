// iu_pkg: types shared by the protected integer-unit blocks.
package iu_pkg;
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_XOR = 3'd4,
    ALU_SLL = 3'd5,
    ALU_SRL = 3'd6,
    ALU_SRA = 3'd7
  } alu_op_e;

  // Error classes of the protection scheme: who handles a detection.
  typedef enum logic [1:0] {
    ERR_LOCAL   = 2'd0,  // corrected in place (cache refill, re-execution)
    ERR_CENTRAL = 2'd1,  // needs the OS: checkpoint rollback
    ERR_MIXED   = 2'd2   // handled in place and also reported to the OS
  } err_class_e;

  // Detection sources gathered by the error monitor (bit positions).
  localparam int unsigned ERR_NSRC       = 7;
  localparam int unsigned SRC_CACHE_PERR = 0;  // cache tag/data parity, refilled
  localparam int unsigned SRC_SET_RECOV  = 1;  // pipeline SET, re-executed
  localparam int unsigned SRC_PIPE_SEU   = 2;  // pipeline register parity
  localparam int unsigned SRC_SET_DETECT = 3;  // pipeline SET, detection-only stage
  localparam int unsigned SRC_RF_PERR    = 4;  // register file parity
  localparam int unsigned SRC_AES        = 5;  // cryptographic IP detection
  localparam int unsigned SRC_CACHE_SET  = 6;  // cache controller SET (parity prediction)

  function automatic err_class_e src_class(input int unsigned src);
    case (src)
      SRC_CACHE_PERR, SRC_SET_RECOV: return ERR_LOCAL;
      SRC_AES:                       return ERR_MIXED;
      default:                       return ERR_CENTRAL;
    endcase
  endfunction
endpackage
