// Test support: builds a random delayed-input DFA, lays it out in the transition-table format
// and computes reference results independently of the RTL.
//
// State 0 is the root: it labels every symbol. Every other state i labels each symbol of a
// small alphabet with probability LABEL_PCT percent and has a default transition to a random
// state below i, so every default chain ends at the root; chains may be several defaults long,
// as in a D2FA of radius above one. Each state gets a random one-bit match flag, and a
// labelled transition carries the flag of its target. Layout: state numbers are chosen first
// fit so that the rows, placed at (number + symbol) mod depth, never collide. The reference
// step follows defaults until the symbol is labelled, exactly the D2FA semantics.
package tb_d2fa_pkg;
  import regex_pkg::*;

  typedef struct {
    bit       sel;       // 0 labelled array, 1 default array
    state_t   addr;
    tt_item_t item;
    state_t   dflt;
  } wr_t;

  class d2fa_model;
    int num_states;
    int alpha;
    int label_pct;
    int other_pct = 10;  // percentage of symbols outside the alphabet in rand_sym
    int num [];          // state number (row base) of each abstract state
    int dflt [];
    int lab [][256];     // labelled target, -1 if none
    bit acc [];
    wr_t writes [$];

    function new(int ns, int a, int pct);
      num_states = ns;
      alpha      = a;
      label_pct  = pct;
    endfunction

    function void build();
      bit used_slot [TT_DEPTH];
      bit used_num  [TT_DEPTH];
      num  = new[num_states];
      dflt = new[num_states];
      lab  = new[num_states];
      acc  = new[num_states];
      foreach (used_slot[k]) begin used_slot[k] = 0; used_num[k] = 0; end
      for (int i = 0; i < num_states; i++) begin
        acc[i]  = ($urandom_range(0, 3) == 0) && (i != 0);
        dflt[i] = (i == 0) ? 0 : $urandom_range(0, i - 1);
        for (int c = 0; c < 256; c++) begin
          if (i == 0) lab[i][c] = (c < alpha) ? $urandom_range(0, num_states - 1) : 0;
          else if (c < alpha && $urandom_range(0, 99) < label_pct)
            lab[i][c] = $urandom_range(0, num_states - 1);
          else lab[i][c] = -1;
        end
      end
      // first-fit row placement
      for (int i = 0; i < num_states; i++) begin
        for (int o = 0; o < TT_DEPTH; o++) begin
          bit ok = !used_num[o];
          for (int c = 0; c < 256 && ok; c++)
            if (lab[i][c] >= 0 && used_slot[(o + c) % TT_DEPTH]) ok = 0;
          if (ok) begin
            num[i] = o;
            used_num[o] = 1;
            for (int c = 0; c < 256; c++)
              if (lab[i][c] >= 0) used_slot[(o + c) % TT_DEPTH] = 1;
            break;
          end
          if (o == TT_DEPTH - 1) $fatal(1, "table full");
        end
      end
      writes.delete();
      for (int i = 0; i < num_states; i++) begin
        wr_t w;
        for (int c = 0; c < 256; c++) if (lab[i][c] >= 0) begin
          w.sel  = 0;
          w.addr = state_t'((num[i] + c) % TT_DEPTH);
          w.item = '{valid: 1'b1, sym: sym_t'(c), next: state_t'(num[lab[i][c]]),
                     match: match_t'(acc[lab[i][c]])};
          w.dflt = '0;
          writes.push_back(w);
        end
        w.sel  = 1;
        w.addr = state_t'(num[i]);
        w.item = '0;
        w.dflt = state_t'(num[dflt[i]]);
        writes.push_back(w);
      end
    endfunction

    // One symbol from abstract state s: returns the abstract next state and the number of
    // default transitions taken.
    function int step(int s, int c, output int ndef);
      ndef = 0;
      while (lab[s][c] < 0) begin
        s = dflt[s];
        ndef++;
      end
      return lab[s][c];
    endfunction

    function int rand_sym();
      // mostly from the alphabet, sometimes a symbol only the root labels
      return ($urandom_range(0, 99) < other_pct) ? $urandom_range(alpha, 255)
                                                 : $urandom_range(0, alpha - 1);
    endfunction
  endclass

endpackage
