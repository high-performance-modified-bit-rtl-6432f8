// pc_pkg: types and constants shared by the bit-vector packet classifier.
//
// The classifier splits each W-bit header field into W/K sub-fields of K
// bits and handles one sub-field per pipeline stage.  The defaults W = 16
// and K = 4 (four stages) are the published configuration; the rule count
// N is not published and 32 is this design's own choice.
//
// Rules are loaded through one configuration port shared by all field
// engines.  cfg_tgt_e selects which table a configuration write goes to.
package pc_pkg;

  localparam int unsigned W_DEFAULT = 16;  // rule / header field width
  localparam int unsigned K_DEFAULT = 4;   // sub-field (stride) width
  localparam int unsigned N_DEFAULT = 32;  // number of rules

  // Width of the header fields carried from the header extractor.
  localparam int unsigned IP_ADDR_W = 32;
  localparam int unsigned PORT_W    = 16;

  // Target of a configuration write.
  typedef enum logic [2:0] {
    CFG_RULE_EN = 3'd0,  // rule-enable vector (BV input of the first MBV stage)
    CFG_SA      = 3'd1,  // one row of a source-address BV memory
    CFG_DA      = 3'd2,  // one row of a destination-address BV memory
    CFG_SP      = 3'd3,  // lower/upper bound of one source-port rule
    CFG_DP      = 3'd4   // lower/upper bound of one destination-port rule
  } cfg_tgt_e;

  // Header fields as delivered by the header extractor.
  typedef struct packed {
    logic [IP_ADDR_W-1:0] sa;
    logic [IP_ADDR_W-1:0] da;
    logic [PORT_W-1:0]    sp;
    logic [PORT_W-1:0]    dp;
  } hdr_t;

endpackage
