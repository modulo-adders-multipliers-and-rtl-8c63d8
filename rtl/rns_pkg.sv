// rns_pkg: types and elaboration-time helpers shared by the modulo arithmetic units.
//
// modsel_t selects the modulus of the shared-moduli units. Its encoding is a choice of
// this design; the source only states that a select signal chooses the end-around bit
// (carry out for 2^n-1, inverted carry out for 2^n+1, zero for 2^n).
//
// prefix_tree_t selects the parallel-prefix carry network. The three networks are the
// ones the shared-moduli multiplier was evaluated with (Sklansky, Brent-Kung and
// Kogge-Stone); Sklansky is the default used for every two-operand adder.
//
// prefix_levels() and prefix_partner() describe each network at elaboration time:
// at level l, bit i either passes its (P,G) pair down unchanged (partner -1) or merges
// it with the pair of the partner bit through one prefix node.
package rns_pkg;

  typedef enum logic [1:0] {
    MOD_2N_M1 = 2'd0,   // modulus 2^n - 1 : end-around carry (EAC)
    MOD_2N    = 2'd1,   // modulus 2^n     : carry out discarded
    MOD_2N_P1 = 2'd2    // modulus 2^n + 1 : complemented end-around carry (CEAC)
  } modsel_t;

  typedef enum int {
    SKLANSKY    = 0,
    BRENT_KUNG  = 1,
    KOGGE_STONE = 2
  } prefix_tree_t;

  function automatic int clog2i(input int v);
    int r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // Number of prefix-node levels of a network over w bits.
  function automatic int prefix_levels(input prefix_tree_t tree, input int w);
    int l;
    l = clog2i(w);
    if (w <= 1) return 0;
    if (tree == BRENT_KUNG) return 2 * l - 1;
    return l;
  endfunction

  // Bit whose (P,G) pair bit i merges with at level lev, or -1 when bit i only passes through.
  function automatic int prefix_partner(input prefix_tree_t tree, input int w,
                                        input int lev, input int i);
    int l, d, j;
    l = clog2i(w);
    case (tree)
      KOGGE_STONE: begin
        if (i >= (1 << lev)) return i - (1 << lev);
        return -1;
      end
      BRENT_KUNG: begin
        if (lev < l) begin
          // up-sweep: bit i collects the group ending at it
          if (((i + 1) % (1 << (lev + 1))) == 0) return i - (1 << lev);
          return -1;
        end
        // down-sweep: fill in the bits between the up-sweep results
        d = 2 * l - 2 - lev;
        j = i - (1 << d);
        if ((((i + 1) % (1 << (d + 1))) == (1 << d)) && (i >= (1 << (d + 1))) && (j >= 0))
          return j;
        return -1;
      end
      default: begin  // SKLANSKY
        if (((i >> lev) & 1) == 1) return ((i >> lev) << lev) - 1;
        return -1;
      end
    endcase
  endfunction

  // Number of carry-save levels of a Wallace tree that reduces k operands to two:
  // at every level each full group of three operands becomes two.
  function automatic int wallace_levels(input int k);
    int n, lv;
    n = k;
    lv = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + (n % 3);
      lv++;
    end
    return lv;
  endfunction

  // Number of operands left after lev levels of that reduction.
  function automatic int wallace_count(input int k, input int lev);
    int n;
    n = k;
    for (int i = 0; i < lev; i++) n = 2 * (n / 3) + (n % 3);
    return n;
  endfunction

endpackage
