// ac_tb_pkg: reference models shared by the testbenches.
// Functions are given as disjoint cube lists (value word, don't-care mask).
// Everything here works minterm by minterm, independently of how the RTL
// tests cube containment.
package ac_tb_pkg;

  typedef struct {
    longint unsigned val;
    longint unsigned dc;
  } cube_t;

  // Random disjoint cube list over n inputs: split the universe cube on random
  // free inputs; each piece that stops splitting is kept with probability 1/2.
  // Value bits under don't-care positions are randomised on purpose.
  function automatic void gen_cubes(int n, int leaf_pct, int max_cubes, ref cube_t out[$]);
    cube_t work[$];
    cube_t c, a, b;
    longint unsigned full = (n == 64) ? '1 : ((64'd1 << n) - 1);
    out.delete();
    c.val = 0;
    c.dc  = full;
    work.push_back(c);
    while (work.size() > 0) begin
      c = work.pop_back();
      if (c.dc == 0 || int'($urandom_range(99)) < leaf_pct || out.size() + work.size() >= max_cubes) begin
        if ($urandom_range(1) == 1 && out.size() < max_cubes) begin
          c.val = (c.val & ~c.dc) | ({$urandom, $urandom} & c.dc);
          out.push_back(c);
        end
      end else begin
        int bitpos;
        do bitpos = $urandom_range(n - 1); while (((c.dc >> bitpos) & 1) == 0);
        a = c; b = c;
        a.dc  = c.dc & ~(64'd1 << bitpos);
        b.dc  = a.dc;
        a.val = c.val & ~(64'd1 << bitpos);
        b.val = c.val | (64'd1 << bitpos);
        work.push_back(a);
        work.push_back(b);
      end
    end
  endfunction

  // Minterms m with f(m) = 1 as a list of single-minterm cubes, from a list.
  function automatic bit in_list(ref cube_t cl[$], input longint unsigned m);
    foreach (cl[i])
      if (((m ^ cl[i].val) & ~cl[i].dc) == 0) return 1'b1;
    return 1'b0;
  endfunction

  // Exact autocorrelation coefficient over n inputs.
  function automatic longint unsigned ac_exact(ref cube_t cl[$], input int n, input longint unsigned u);
    longint unsigned s = 0;
    for (longint unsigned v = 0; v < (64'd1 << n); v++)
      if (in_list(cl, v) && in_list(cl, v ^ u)) s++;
    return s;
  endfunction

  // The cube-list procedure: for each cube c, if every minterm of c xor u lies
  // in one single cube d of the list, add the number of minterms of c.
  function automatic longint unsigned ac_procedure(ref cube_t cl[$], input longint unsigned u);
    longint unsigned s = 0;
    foreach (cl[i]) begin
      bit found = 0;
      longint unsigned size = 64'd1 << $countones(cl[i].dc);
      foreach (cl[j]) begin
        bit all_in = 1;
        longint unsigned sub = 0;
        // enumerate the minterms of c xor u
        do begin
          longint unsigned m = ((cl[i].val & ~cl[i].dc) | sub) ^ u;
          if (((m ^ cl[j].val) & ~cl[j].dc) != 0) all_in = 0;
          sub = (sub - cl[i].dc) & cl[i].dc;
        end while (sub != 0 && all_in);
        if (all_in) found = 1;
      end
      if (found) s += size;
    end
    return s;
  endfunction

endpackage
