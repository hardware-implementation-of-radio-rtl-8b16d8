// radio_pkg: types, constants and constant functions shared by the detection and
// demodulation blocks.
//
// A sideband tag travels with every period's data through the pipelines. It says
// whether the period is the last one of an information symbol and which symbol of
// the codeword it belongs to, so that every decision stage knows when to sample
// the sliding sums without a counter of its own. The code table of the coded-PSK
// demodulator is computed here from a linear recurrence rather than stored.
package radio_pkg;

  // Width of the symbol-number field of the tag; codes of up to 255 symbols.
  localparam int SYM_W = 8;
  // Widest code the code-table function can return.
  localparam int MAX_K = 255;

  typedef struct packed {
    logic             sym_last;  // this period closes an information symbol
    logic [SYM_W-1:0] sym_idx;   // symbol number inside the codeword, 0 = first
  } tag_t;

  // Binary maximal-length sequence of length K = 2^m - 1 (m = 2..8), from the
  // recurrence a[t+m] = a[t+j] xor a[t] of the primitive trinomial or pentanomial
  // listed below, started from all ones. Bit t of the result is chip t.
  function automatic logic [MAX_K-1:0] mseq(input int unsigned k_len);
    logic [MAX_K-1:0] a;
    int unsigned m;
    a = '0;
    m = 0;
    for (int unsigned i = 2; i <= 8; i++) if ((1 << i) - 1 == k_len) m = i;
    for (int unsigned t = 0; t < MAX_K; t++) begin
      if (t < m) a[t] = 1'b1;
      else if (t < k_len) begin
        case (m)
          2: a[t] = a[t-2] ^ a[t-1];                        // x^2+x+1
          3: a[t] = a[t-3] ^ a[t-2];                        // x^3+x+1
          4: a[t] = a[t-4] ^ a[t-3];                        // x^4+x+1
          5: a[t] = a[t-5] ^ a[t-3];                        // x^5+x^2+1
          6: a[t] = a[t-6] ^ a[t-5];                        // x^6+x+1
          7: a[t] = a[t-7] ^ a[t-6];                        // x^7+x+1
          default: a[t] = a[t-8] ^ a[t-6] ^ a[t-5] ^ a[t-4]; // x^8+x^4+x^3+x^2+1
        endcase
      end
    end
    return a;
  endfunction

  // Code families of the coded-PSK demodulator.
  typedef enum int {
    CODE_MSEQ      = 0,   // M-sequence and its time reversal, cyclic shifts
    CODE_WALSH     = 1,   // rows of the Sylvester-Hadamard matrix, K a power of two
    CODE_HAMMING74 = 2    // the 16 codewords of the (7,4) Hamming code, K = 7
  } code_family_e;

  // Codeword number cw (0-based) of a family of K-chip M-sequence codes: even
  // numbers take the sequence, odd numbers its time reversal (the sequence of the
  // reciprocal polynomial); codewords 2 and up are cyclic shifts of those two by
  // cw/2 chips. Bit i is chip i; 1 stands for a = +1, 0 for a = -1.
  function automatic logic [MAX_K-1:0] code_word(input int unsigned k_len, input int unsigned cw);
    logic [MAX_K-1:0] base, r;
    int unsigned sh;
    base = mseq(k_len);
    r = '0;
    sh = (cw / 2) % k_len;
    for (int unsigned i = 0; i < k_len; i++) begin
      if (cw % 2 == 0) r[i] = base[(i + sh) % k_len];
      else             r[i] = base[(2 * k_len - 1 - i - sh) % k_len];
    end
    return r;
  endfunction

  // Walsh codeword cw of length K = 2^m: chip i is +1 when i & cw has an even
  // number of ones.
  function automatic logic [MAX_K-1:0] walsh_word(input int unsigned k_len, input int unsigned cw);
    logic [MAX_K-1:0] r;
    r = '0;
    for (int unsigned i = 0; i < k_len; i++) r[i] = ~(^(i & cw));
    return r;
  endfunction

  // Hamming (7,4) codeword for the data bits d: chips 0..3 carry
  // d0..d3, chips 4..6 the parities d0^d1^d3, d0^d2^d3, d1^d2^d3. A 1 bit is sent
  // as a = +1.
  function automatic logic [MAX_K-1:0] hamming74_word(input logic [3:0] d);
    logic [MAX_K-1:0] r;
    r = '0;
    r[3:0] = d;
    r[4] = d[0] ^ d[1] ^ d[3];
    r[5] = d[0] ^ d[2] ^ d[3];
    r[6] = d[1] ^ d[2] ^ d[3];
    return r;
  endfunction

  // Codeword cw of the given family and length.
  function automatic logic [MAX_K-1:0] family_word(input code_family_e fam, input int unsigned k_len,
                                                   input int unsigned cw);
    case (fam)
      CODE_WALSH:     return walsh_word(k_len, cw);
      CODE_HAMMING74: return hamming74_word(4'(cw));
      default:        return code_word(k_len, cw);
    endcase
  endfunction

endpackage
