// zstd_pkg - constants, types and functions shared by the Zstd compression kernel.
//
// Holds the kernel's sizes (4 input bytes per cycle, 4 hash match engines of 4
// hash tables, 4096-entry tables, a 64 KB history), the 4-byte hash used by the
// reference Zstd software (multiply by 2654435761, keep the top 12 bits), the
// Zstd literal-length / match-length / offset code tables (baselines and extra
// bit counts of the Zstd format) and the construction of the static FSE
// compression tables from the Zstd predefined distributions. The FSE tables are
// built by constant functions at elaboration time, following the table
// construction of the Zstd format (symbol spreading with step 5/8*size+3,
// low-probability symbols placed at the top of the table).
package zstd_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_ENGINES       = 4;      // hash match engines per kernel
  localparam int unsigned N_TABLES        = 4;      // hash tables per engine
  localparam int unsigned HASH_ENTRIES    = 4096;   // entries per hash table
  localparam int unsigned HIST_BYTES      = 65536;  // history buffer size
  localparam int unsigned POS_W           = 32;     // absolute byte position width
  localparam int unsigned BLOCK_BYTES     = 131072; // largest task (one Zstd block)
  localparam int unsigned LEN_W           = 18;     // literal / match length width
  localparam int unsigned OFV_W           = 18;     // offset value width (offset+3 or 1..3)

  localparam logic [31:0] HASH_PRIME4 = 32'd2654435761;

  typedef logic [POS_W-1:0] pos_t;
  typedef logic [LEN_W-1:0] len_t;
  typedef logic [OFV_W-1:0] ofv_t;

  // One entry of the sequence stream between the match controller and the
  // entropy stage. has_seq: a sequence is carried; last: the task ends here
  // (lit_len of a last-only entry is the count of trailing literals).
  typedef struct packed {
    logic       has_seq;
    logic       last;
    len_t       lit_len;
    len_t       match_len;
    logic [POS_W-1:0] offset;
  } seq_raw_t;

  // A sequence after repeat-offset coding.
  typedef struct packed {
    logic has_seq;
    logic last;
    len_t lit_len;
    len_t match_len;
    ofv_t off_value;
  } seq_t;

  // Zstd 4-byte hash of the little-endian word u, reduced to hbits bits.
  function automatic logic [31:0] zstd_hash4(input logic [31:0] u, input int unsigned hbits);
    logic [31:0] prod;
    prod = u * HASH_PRIME4;
    return prod >> (32 - hbits);
  endfunction

  // Position of the highest set bit (v > 0).
  function automatic int unsigned highbit32(input logic [31:0] v);
    int unsigned r;
    r = 0;
    for (int i = 0; i < 32; i++) if (v[i]) r = i;
    return r;
  endfunction

  // ---------------------------------------------------------------- codes
  // Literal-length codes 0..35: baseline and number of extra bits.
  function automatic int unsigned ll_base(input int unsigned c);
    case (c)
      16: return 16;  17: return 18;  18: return 20;  19: return 22;
      20: return 24;  21: return 28;  22: return 32;  23: return 40;
      24: return 48;  25: return 64;  26: return 128; 27: return 256;
      28: return 512; 29: return 1024; 30: return 2048; 31: return 4096;
      32: return 8192; 33: return 16384; 34: return 32768; 35: return 65536;
      default: return c;
    endcase
  endfunction

  function automatic int unsigned ll_bits(input int unsigned c);
    case (c)
      16, 17, 18, 19: return 1;
      20, 21: return 2;
      22, 23: return 3;
      24: return 4;
      default: return (c >= 25) ? c - 19 : 0;
    endcase
  endfunction

  // Match-length codes 0..52 in the "match length - 3" domain.
  function automatic int unsigned ml_base(input int unsigned c);
    case (c)
      32: return 32;  33: return 34;  34: return 36;  35: return 38;
      36: return 40;  37: return 44;  38: return 48;  39: return 56;
      40: return 64;  41: return 80;  42: return 96;
      default: return (c >= 43) ? (1 << (c - 36)) : c;
    endcase
  endfunction

  function automatic int unsigned ml_bits(input int unsigned c);
    case (c)
      32, 33, 34, 35: return 1;
      36, 37: return 2;
      38, 39: return 3;
      40, 41: return 4;
      42: return 5;
      default: return (c >= 43) ? c - 36 : 0;
    endcase
  endfunction

  // Largest code whose baseline does not exceed v.
  function automatic logic [5:0] ll_code(input logic [LEN_W-1:0] v);
    logic [5:0] r;
    r = 0;
    for (int c = 0; c < 36; c++) if (ll_base(c) <= v) r = 6'(c);
    return r;
  endfunction

  function automatic logic [5:0] ml_code(input logic [LEN_W-1:0] mlbase);
    logic [5:0] r;
    r = 0;
    for (int c = 0; c < 53; c++) if (ml_base(c) <= mlbase) r = 6'(c);
    return r;
  endfunction

  // ---------------------------------------------------------------- FSE
  typedef enum logic [1:0] {FSE_LL = 2'd0, FSE_ML = 2'd1, FSE_OF = 2'd2} fse_kind_e;

  localparam int unsigned OF_LOG = 5;   // literal and match length tables: 6
  localparam int unsigned LL_NSYM = 36, ML_NSYM = 53, OF_NSYM = 29;
  localparam int unsigned FSE_MAXSYM = 53;   // largest alphabet
  localparam int unsigned FSE_MAXT   = 64;   // largest table

  function automatic int unsigned fse_log(input fse_kind_e k);
    return (k == FSE_OF) ? OF_LOG : 6;
  endfunction

  function automatic int unsigned fse_nsym(input fse_kind_e k);
    return (k == FSE_LL) ? LL_NSYM : (k == FSE_ML) ? ML_NSYM : OF_NSYM;
  endfunction

  // Zstd predefined normalized counts (-1 = "less than one").
  function automatic int fse_norm(input fse_kind_e k, input int unsigned s);
    int r;
    r = 0;
    if (k == FSE_LL) begin
      if (s == 0) r = 4;
      else if (s == 1) r = 3;
      else if (s <= 12) r = 2;
      else if (s <= 15) r = 1;
      else if (s <= 24) r = 2;
      else if (s == 25) r = 3;
      else if (s == 26) r = 2;
      else if (s <= 31) r = 1;
      else if (s <= 35) r = -1;
    end else if (k == FSE_ML) begin
      if (s == 0) r = 1;
      else if (s == 1) r = 4;
      else if (s == 2) r = 3;
      else if (s <= 8) r = 2;
      else if (s <= 45) r = 1;
      else if (s <= 52) r = -1;
    end else begin
      if (s <= 5) r = 1;
      else if (s <= 8) r = 2;
      else if (s <= 23) r = 1;
      else if (s <= 28) r = -1;
    end
    return r;
  endfunction

  // Symbol at each table position after spreading.
  function automatic logic [FSE_MAXT-1:0][5:0] fse_spread(input fse_kind_e k);
    logic [FSE_MAXT-1:0][5:0] tab;
    int unsigned tsize, mask, step, high, pos;
    tab   = '0;
    tsize = 1 << fse_log(k);
    mask  = tsize - 1;
    step  = (tsize >> 1) + (tsize >> 3) + 3;
    high  = tsize - 1;
    for (int s = 0; s < int'(fse_nsym(k)); s++)
      if (fse_norm(k, s) == -1) begin
        tab[high] = 6'(s);
        high--;
      end
    pos = 0;
    for (int s = 0; s < int'(fse_nsym(k)); s++)
      for (int n = 0; n < fse_norm(k, s); n++) begin
        tab[pos] = 6'(s);
        pos = (pos + step) & mask;
        while (pos > high) pos = (pos + step) & mask;
      end
    return tab;
  endfunction

  // State table: next state (size + table position) in symbol-sorted order.
  function automatic logic [FSE_MAXT-1:0][7:0] fse_state_table(input fse_kind_e k);
    logic [FSE_MAXT-1:0][7:0] st;
    logic [FSE_MAXT-1:0][5:0] tab;
    int cumul [FSE_MAXSYM+1];
    int unsigned tsize;
    st    = '0;
    tab   = fse_spread(k);
    tsize = 1 << fse_log(k);
    cumul[0] = 0;
    for (int s = 1; s <= FSE_MAXSYM; s++) begin
      if (s <= int'(fse_nsym(k)))
        cumul[s] = cumul[s-1] + ((fse_norm(k, s-1) == -1) ? 1 : fse_norm(k, s-1));
      else
        cumul[s] = cumul[s-1];
    end
    for (int u = 0; u < int'(tsize); u++) begin
      st[cumul[tab[u]]] = 8'(tsize + u);
      cumul[tab[u]]++;
    end
    return st;
  endfunction

  // Per-symbol transform: deltaNbBits (bits 31:0) and deltaFindState (47:32, signed).
  function automatic logic [FSE_MAXSYM-1:0][47:0] fse_symbol_tt(input fse_kind_e k);
    logic [FSE_MAXSYM-1:0][47:0] tt;
    int total, tlog, tsize, n, maxbits, minplus;
    logic [31:0] dnb;
    logic [15:0] dfs;
    tt    = '0;
    tlog  = int'(fse_log(k));
    tsize = 1 << tlog;
    total = 0;
    for (int s = 0; s < int'(fse_nsym(k)); s++) begin
      n = fse_norm(k, s);
      if (n == 0) begin
        dnb = 32'(((tlog + 1) << 16) - tsize);
        dfs = 16'(0);
      end else if (n == -1 || n == 1) begin
        dnb = 32'((tlog << 16) - tsize);
        dfs = 16'(total - 1);
        total++;
      end else begin
        maxbits = tlog - int'(highbit32(32'(n - 1)));
        minplus = n << maxbits;
        dnb = 32'((maxbits << 16) - minplus);
        dfs = 16'(total - n);
        total += n;
      end
      tt[s] = {dfs, dnb};
    end
    return tt;
  endfunction

endpackage
