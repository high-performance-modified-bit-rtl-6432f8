// pc_tb_pkg: rule model shared by the classifier testbenches.
//
// A rule matches a header when
//   (sa ^ sa_val) & sa_mask == 0      ternary / prefix match on the source address
//   (da ^ da_val) & da_mask == 0      same on the destination address
//   sp_lo <= sp <= sp_hi              range on the source port
//   dp_lo <= dp <= dp_hi              range on the destination port
// The package turns a rule into the contents of the bit-vector memories
// (row v of stage s holds bit i when rule i accepts value v in sub-field s,
// most significant sub-field first) and gives the reference classification:
// the lowest-numbered enabled matching rule wins.  All fields are 16 bits.
package pc_tb_pkg;

  typedef struct packed {
    logic [15:0] sa_val, sa_mask;
    logic [15:0] da_val, da_mask;
    logic [15:0] sp_lo, sp_hi;
    logic [15:0] dp_lo, dp_hi;
  } rule_t;

  localparam int MAXN = 64;

  // Does value v of K-bit sub-field s (of a 16-bit field) satisfy val/mask?
  function automatic bit subfield_ok(logic [15:0] val, logic [15:0] mask,
                                     int s, int k, int v);
    logic [15:0] sh_val, sh_mask;
    sh_val  = val  >> (16 - k * (s + 1));
    sh_mask = mask >> (16 - k * (s + 1));
    for (int b = 0; b < k; b++)
      if (sh_mask[b] && (sh_val[b] != v[b])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit rule_hit(rule_t r, logic [15:0] sa, logic [15:0] da,
                                  logic [15:0] sp, logic [15:0] dp);
    return (((sa ^ r.sa_val) & r.sa_mask) == 16'd0) &&
           (((da ^ r.da_val) & r.da_mask) == 16'd0) &&
           (sp >= r.sp_lo) && (sp <= r.sp_hi) &&
           (dp >= r.dp_lo) && (dp <= r.dp_hi);
  endfunction

  // A random rule: a prefix of 0..16 bits on each address, a random range
  // (sometimes the full range, sometimes a single port) on each port.
  function automatic rule_t random_rule();
    rule_t r;
    int    len;
    logic [15:0] a, b;
    len = $urandom_range(16, 0);
    r.sa_mask = (len == 0) ? 16'h0 : ~(16'hFFFF >> len);
    r.sa_val  = 16'($urandom) & r.sa_mask;
    len = $urandom_range(16, 0);
    r.da_mask = (len == 0) ? 16'h0 : ~(16'hFFFF >> len);
    r.da_val  = 16'($urandom) & r.da_mask;
    for (int f = 0; f < 2; f++) begin
      case ($urandom_range(3, 0))
        0:       begin a = 16'h0000; b = 16'hFFFF; end
        1:       begin a = 16'($urandom); b = a; end
        default: begin
          a = 16'($urandom); b = 16'($urandom);
          if (a > b) begin logic [15:0] t; t = a; a = b; b = t; end
        end
      endcase
      if (f == 0) begin r.sp_lo = a; r.sp_hi = b; end
      else        begin r.dp_lo = a; r.dp_hi = b; end
    end
    return r;
  endfunction

  // A field value that rule r accepts.
  function automatic logic [15:0] pick_in(logic [15:0] val, logic [15:0] mask);
    return (val & mask) | (16'($urandom) & ~mask);
  endfunction

  function automatic logic [15:0] pick_range(logic [15:0] lo, logic [15:0] hi);
    case ($urandom_range(3, 0))
      0: return lo;
      1: return hi;
      default: return 16'(lo + ($urandom % (32'(hi) - 32'(lo) + 1)));
    endcase
  endfunction

endpackage
