// Reference model of the cube-calculus operations, for the testbenches.
//
// Works at the level of whole literals, independently of the cell chains of the
// RTL: a cube of up to 64 two-bit cells is a 128-bit word, cell 1 in the most
// significant bits, and a partition of the cells into literals is given as
// lit[i] = literal number of cell i (1-based cells). Each operation returns the
// queue of resultant cubes in the order the machine produces them (active
// literal from left to right), with cubes that contain an empty literal left
// out, and the number of specific literals.
package ccm_ref_pkg;

  typedef logic [127:0] cube_t;

  // Mask of the bits of literal l.
  function automatic cube_t lit_mask(int nit, int lit[65], int l);
    cube_t mk = '0;
    for (int i = 1; i <= nit; i++)
      if (lit[i] == l) mk[2*(nit-i)+1 -: 2] = 2'b11;
    return mk;
  endfunction

  function automatic int n_lits(int nit, int lit[65]);
    return lit[nit];
  endfunction

  function automatic bit has_empty(cube_t c, int nit, int lit[65]);
    for (int l = 1; l <= n_lits(nit, lit); l++)
      if ((c & lit_mask(nit, lit, l)) == '0) return 1'b1;
    return 1'b0;
  endfunction

  // M register contents (NIT+2 bits, IT[0] first) for a partition.
  function automatic cube_t m_of(int nit, int lit[65]);
    cube_t m = '0;
    // IT[0] gets 1, then literals alternate 0,1,0,...; IT[n+1] differs from IT[n]
    m[nit+1] = 1'b1;
    for (int i = 1; i <= nit; i++) m[nit+1-i] = ~lit[i][0];
    m[0] = ~m[1];
    return m;
  endfunction

  // op codes follow ccm_pkg::op_e
  function automatic void run(int op, cube_t a, cube_t b, int nit, int lit[65],
                              ref cube_t res[$], output int count);
    cube_t full, mk, c, anb, aub, ab;
    int nl;
    res.delete();
    count = 0;
    nl   = n_lits(nit, lit);
    full = '0;
    for (int i = 0; i < 2*nit; i++) full[i] = 1'b1;
    a &= full; b &= full;
    ab = a & b; aub = a | b; anb = a & ~b;
    case (op)
      1: begin if (!has_empty(ab, nit, lit)) res.push_back(ab);
               for (int l = 1; l <= nl; l++) count++; end
      2: begin if (!has_empty(aub, nit, lit)) res.push_back(aub); count = nl; end
      3: begin // binary consensus: union in disjoint literals, intersection elsewhere
        c = '0;
        for (int l = 1; l <= nl; l++) begin
          mk = lit_mask(nit, lit, l);
          if ((ab & mk) == '0) begin c |= aub & mk; count++; end
          else c |= ab & mk;
        end
        if (!has_empty(c, nit, lit)) res.push_back(c);
      end
      4, 5: begin // sharp / disjoint sharp
        for (int l = 1; l <= nl; l++) begin
          mk = lit_mask(nit, lit, l);
          if ((anb & mk) != '0) begin
            count++;
            if (op == 4) c = (a & ~mk) | (anb & mk);
            else begin
              c = anb & mk;
              for (int k = 1; k <= nl; k++) begin
                if (k < l) c |= ab & lit_mask(nit, lit, k);
                if (k > l) c |= a  & lit_mask(nit, lit, k);
              end
            end
            if (!has_empty(c, nit, lit)) res.push_back(c);
          end
        end
      end
      6: begin // consensus
        for (int l = 1; l <= nl; l++) begin
          mk = lit_mask(nit, lit, l);
          count++;
          c = (ab & ~mk) | (aub & mk);
          if (!has_empty(c, nit, lit)) res.push_back(c);
        end
      end
      7: begin // complement of A (De Morgan, one cube per non-full literal)
        for (int l = 1; l <= nl; l++) begin
          mk = lit_mask(nit, lit, l);
          if ((a & mk) != mk) begin
            count++;
            c = (full & ~mk) | (~a & mk);
            if (!has_empty(c, nit, lit)) res.push_back(c);
          end
        end
      end
      8: begin // distance
        for (int l = 1; l <= nl; l++)
          if ((ab & lit_mask(nit, lit, l)) == '0) count++;
      end
      default: ;
    endcase
  endfunction

  // Random partition of nit cells into literals of 1..maxw cells.
  function automatic void rand_part(int nit, int maxw, output int lit[65]);
    int l = 0, left = 0;
    lit = '{default: 0};
    for (int i = 1; i <= nit; i++) begin
      if (left == 0) begin l++; left = 1 + ($urandom % maxw); end
      lit[i] = l;
      left--;
    end
  endfunction

endpackage
