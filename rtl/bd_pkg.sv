// bd_pkg: types and constants shared by the BusDoctor monitoring and
// injection logic.
//
// The sixteen diagnosis flags follow the list of the BusDoctor flags and
// their grouping into the four standard FlexRay status flags (vSS!ValidFrame,
// vSS!SyntaxError, vSS!ContentError, vSS!BViolation). The flag bit positions,
// the packet identifier codes and the FlexRay coding constants below are this
// design's choice; the coding constants are those of the FlexRay protocol
// (10 Mbit/s, 8 samples per bit, header CRC-11 and frame CRC-24).
package bd_pkg;

  // Diagnosis flags, one bit each in a 16-bit flag vector.
  typedef enum logic [3:0] {
    F_CODERR  = 4'd0,   // coding error (byte start sequence)
    F_TSSVIOL = 4'd1,   // transmission start sequence violation
    F_HCRCERR = 4'd2,   // header CRC error
    F_FCRCERR = 4'd3,   // frame CRC error
    F_FESERR  = 4'd4,   // frame end sequence error
    F_SYMB    = 4'd5,   // symbol received
    F_VCE     = 4'd6,   // valid communication element
    F_BVIOL   = 4'd7,   // boundary violation
    F_SWVIOL  = 4'd8,   // symbol window violation
    F_NITVIOL = 4'd9,   // network idle time violation
    F_SOVERR  = 4'd10,  // slot overbooked (several frames in one slot)
    F_NERR    = 4'd11,  // null frame in a dynamic slot
    F_SSERR   = 4'd12,  // sync or startup bit in a dynamic slot
    F_FIDERR  = 4'd13,  // frame identifier differs from the slot number
    F_CCERR   = 4'd14,  // cycle counter differs from the local cycle
    F_SPLERR  = 4'd15   // static payload length error
  } flag_e;

  typedef logic [15:0] flags_t;

  // Standard controller status flags, index into a 4-bit vector.
  localparam int unsigned VSS_VALID   = 0;
  localparam int unsigned VSS_SYNTAX  = 1;
  localparam int unsigned VSS_CONTENT = 2;
  localparam int unsigned VSS_BVIOL   = 3;

  // Flags that make up each standard flag (grouping of the test campaign).
  localparam flags_t SYNTAX_MASK  = 16'h001F;  // CODERR..FESERR
  localparam flags_t BVIOL_MASK   = 16'h0780;  // BVIOL, SWVIOL, NITVIOL, SOVERR
  localparam flags_t CONTENT_MASK = 16'hF800;  // NERR, SSERR, FIDERR, CCERR, SPLERR
  localparam flags_t VALID_MASK   = 16'h0040;  // VCE

  // Packet identifiers: channel and abstraction level.
  localparam logic [7:0] ID_FRAME_A = 8'h01;
  localparam logic [7:0] ID_FRAME_B = 8'h02;
  localparam logic [7:0] ID_BIT_A   = 8'h11;
  localparam logic [7:0] ID_BIT_B   = 8'h12;

  // A bit-level identifier has bit 4 set.
  function automatic logic is_bit_level(input logic [7:0] id);
    return id[4];
  endfunction

  // Communication cycle segments.
  typedef enum logic [1:0] {
    SEG_STATIC  = 2'd0,
    SEG_DYNAMIC = 2'd1,
    SEG_SYMBOL  = 2'd2,
    SEG_NIT     = 2'd3
  } seg_e;

  // FlexRay frame header, 40 bits, first transmitted bit first.
  typedef struct packed {
    logic        reserved;
    logic        ppi;       // payload preamble indicator
    logic        nfi;       // null frame indicator, 0 = null frame
    logic        sync;
    logic        startup;
    logic [10:0] fid;       // frame identifier
    logic [6:0]  plen;      // payload length in 16-bit words
    logic [10:0] hcrc;
    logic [5:0]  cyc;       // cycle count
  } fr_header_t;

  // FlexRay CRC polynomials and initial values.
  localparam logic [10:0] HCRC_POLY   = 11'h385;
  localparam logic [10:0] HCRC_INIT   = 11'h01A;
  localparam logic [23:0] FCRC_POLY   = 24'h5D6DCB;
  localparam logic [23:0] FCRC_INIT_A = 24'hFEDCBA;
  localparam logic [23:0] FCRC_INIT_B = 24'hABCDEF;

  // One serial CRC step (MSB first, no final inversion).
  function automatic logic [10:0] hcrc_step(input logic [10:0] c, input logic b);
    return (b ^ c[10]) ? ((c << 1) ^ HCRC_POLY) : (c << 1);
  endfunction

  function automatic logic [23:0] fcrc_step(input logic [23:0] c, input logic b);
    return (b ^ c[23]) ? ((c << 1) ^ FCRC_POLY) : (c << 1);
  endfunction

  // One DPRAM word access from a fabric-side master.
  typedef struct packed {
    logic        we;
    logic [15:0] addr;
    logic [31:0] wdata;
  } mem_req_t;

endpackage
