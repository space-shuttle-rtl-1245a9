// shuttle_pkg: types and constants shared by the protected register file,
// the monitoring unit and the Wishbone counter interface.
//
// The register file holds 32 registers of 32 bits in 8 banks of 4 registers.
// Every register keeps six stored fields: the primary word, its SECDED check
// bits, two further copies for triple redundancy, a shadow copy and the
// shadow's SECDED check bits. Four protection mechanisms (ECC, triple
// redundancy, shadow register, ECC-protected shadow register) are enabled one
// by one through prot_cfg_t. The SECDED code (32 data + 6 Hamming + 1 overall
// parity bit) and the field and counter encodings are this design's choices.
package shuttle_pkg;

  localparam int unsigned DATA_W    = 32;  // register width
  localparam int unsigned NUM_REGS  = 32;  // registers in the file
  localparam int unsigned NUM_BANKS = 8;   // banks usable in parallel
  localparam int unsigned ECC_W     = 7;   // SECDED check bits for 32 data bits
  localparam int unsigned CNT_W     = 32;  // monitoring counter width

  // Protection mechanisms, each enabled on its own.
  typedef struct packed {
    logic ecc;         // SECDED on the primary word
    logic tmr;         // triple redundancy: two extra copies, majority vote
    logic shadow;      // shadow copy, compared on read (detection only)
    logic ecc_shadow;  // shadow copy with SECDED, used to repair the primary
  } prot_cfg_t;

  // Stored fields of one register, selectable through the raw access port.
  typedef enum logic [2:0] {
    FLD_DATA   = 3'd0,  // primary word
    FLD_ECC    = 3'd1,  // check bits of the primary word (low 7 bits)
    FLD_COPY1  = 3'd2,  // second copy (triple redundancy)
    FLD_COPY2  = 3'd3,  // third copy (triple redundancy)
    FLD_SHADOW = 3'd4,  // shadow copy
    FLD_SECC   = 3'd5   // check bits of the shadow copy (low 7 bits)
  } field_e;

  // Event counters kept for every register.
  typedef enum logic [1:0] {
    CNT_WRITE     = 2'd0,
    CNT_READ      = 2'd1,
    CNT_DETECTED  = 2'd2,
    CNT_CORRECTED = 2'd3
  } cnt_e;

  localparam int unsigned NUM_CNT_TYPES = 4;

endpackage
