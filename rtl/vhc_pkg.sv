// vhc_pkg -- shared constants and the elaboration-time generator of the
// shared comparison network used by the self-message-excluded check node unit.
//
// A self-message-excluded (SME) min-sum check node with N inputs must produce,
// for every input r, the minimum magnitude over all the other N-1 inputs. Done
// naively that is N separate (N-2)-comparator trees. The generator below
// builds one network of 2-input Min cells in which the sets being minimised
// are shared between rows, while each row still finishes after the fastest
// possible ceil(log2(N-1)) Min levels.
//
// Construction (vertical / horizontal / cyclic set sharing):
//   * Write the N row sets {0..N-1} \ {r} as a matrix. Find the depth budget
//     d = ceil(log2(n-1)) of the current (sub)problem of n elements and the
//     largest set that one level below may hold, H = 2^(d-1).
//   * If n-1 < 2H, cut the elements into consecutive groups of at least n-H
//     elements (as many, as equal as possible). Every row of a group shares
//     the group's complement (at most H elements): this is the vertically
//     shared set. The rest of the row, its group without itself, is the same
//     problem one level smaller and is solved the same way.
//   * If n-1 = 2H the row set is cut into two halves of H elements taken
//     cyclically after r (horizontally cyclic sets).
//   * Every set is minimised as a balanced tree over its element list, and a
//     set that is already in the network is reused rather than built again.
// For N = 6, 7, 8 and 12 this gives 12, 18, 22 and 36 Min cells. The general
// idea (shared power-of-two sets, cyclic sets, fixed depth) is the published
// VHC method; the exact grouping rule is this implementation's reading of it.
//
// The result is a list of nodes: nodes 0..N-1 are the inputs, every node
// k >= N is Min(node A, node B) with A, B < k, so the list is in topological
// order. vhc_build() runs the construction once and returns the whole list as
// one packed constant (vhc_net_t); it is meant for localparams only.
package vhc_pkg;

  // Default size of the check node: the seven-input example unit.
  parameter int unsigned N_IN_DEFAULT = 7;
  // Magnitude width w of a (w+1)-bit sign-magnitude message.
  parameter int unsigned W_DEFAULT    = 5;
  // Bounds of the generator's working arrays.
  parameter int unsigned MAX_N        = 32;
  parameter int unsigned MAX_NODES    = 512;
  parameter int unsigned MAX_CHAIN    = 16;

  // Width of a node number.
  parameter int unsigned IDX_W        = $clog2(MAX_NODES);

  typedef logic [IDX_W-1:0] vhc_idx_t;

  // The generated network. Node k < n is input k; node k >= n is
  // Min(a[k], b[k]). row[r] is the node holding the minimum of all inputs
  // but r. Entries beyond num_nodes (and beyond n for row) are zero.
  typedef struct packed {
    vhc_idx_t [MAX_NODES-1:0] a;
    vhc_idx_t [MAX_NODES-1:0] b;
    vhc_idx_t [MAX_N-1:0]     row;
    logic [15:0]              num_nodes;  // inputs plus Min cells
    logic [7:0]               depth;      // Min levels to the deepest row output
  } vhc_net_t;

  function automatic int unsigned clog2_u(input int unsigned x);
    int unsigned r;
    r = 0;
    while ((32'd1 << r) < x) r++;
    return r;
  endfunction

  // Comparator count of the unshared design: N rows of N-2 cells each.
  function automatic int unsigned direct_cmp_count(input int unsigned n);
    return n * (n - 2);
  endfunction

  function automatic vhc_net_t vhc_build(input int n);
    logic [MAX_N-1:0] nmask [MAX_NODES];
    int               na    [MAX_NODES];
    int               nb    [MAX_NODES];
    int               ndep  [MAX_NODES];
    int               rownode [MAX_N];
    int               num;
    // per-row working storage
    int               lst   [MAX_N];
    int               lst_n;
    int               grp   [MAX_N];
    int               grp_n;
    int               ch_el [MAX_CHAIN*MAX_N];  // set c, element i at c*MAX_N+i
    int               ch_n  [MAX_CHAIN];
    int               ch_node [MAX_CHAIN];
    int               nch;
    int               cur   [MAX_N];
    int               cur_n;
    int               pos, d, h, g, q, start, sz, x, a, b, k, found;
    logic [MAX_N-1:0] m;
    localparam int unsigned NODE_VEC_W = MAX_NODES * IDX_W;
    localparam int unsigned ROW_VEC_W  = MAX_N * IDX_W;
    logic [NODE_VEC_W-1:0] pa, pb;
    logic [ROW_VEC_W-1:0]  pr;
    localparam logic [MAX_N-1:0] ONE_HOT0 = MAX_N'(1);
    int               dd, maxd;
    bit               done;

    num = 0;
    for (int i = 0; i < n; i++) begin
      nmask[i] = ONE_HOT0 << i;
      na[i] = -1;
      nb[i] = -1;
      ndep[i] = 0;
      num++;
    end

    for (int r = 0; r < n; r++) begin
      // ---- walk down the group hierarchy, collecting the row's sets ----
      lst_n = n;
      for (int i = 0; i < n; i++) lst[i] = i;
      nch  = 0;
      done = 1'b0;
      while (!done) begin
        pos = 0;
        for (int i = 0; i < lst_n; i++) if (lst[i] == r) pos = i;
        if (lst_n <= 1) begin
          done = 1'b1;
        end else if (lst_n == 2) begin
          ch_n[nch] = 1;
          ch_el[nch*MAX_N] = lst[1 - pos];
          nch++;
          done = 1'b1;
        end else begin
          d = int'(clog2_u(lst_n - 1));
          h = 1 << (d - 1);
          if (lst_n > 2 * h) begin
            // two cyclic halves of h elements after r
            ch_n[nch] = h;
            ch_n[nch+1] = h;
            for (int i = 0; i < h; i++) begin
              ch_el[nch*MAX_N + i] = lst[(pos + 1 + i) % lst_n];
              ch_el[(nch+1)*MAX_N + i] = lst[(pos + 1 + h + i) % lst_n];
            end
            nch += 2;
            done = 1'b1;
          end else begin
            // groups of at least lst_n - h elements; r's group and its complement
            g = (lst_n - h > 1) ? lst_n - h : 1;
            q = lst_n / g;
            start = 0;
            grp_n = 0;
            for (int j = 0; j < q; j++) begin
              sz = lst_n / q + ((j < lst_n % q) ? 1 : 0);
              if (pos >= start && pos < start + sz) begin
                ch_n[nch] = 0;
                for (int i = 0; i < lst_n; i++) begin
                  if (i >= start && i < start + sz) begin
                    grp[grp_n] = lst[i];
                    grp_n++;
                  end else begin
                    ch_el[nch*MAX_N + ch_n[nch]] = lst[i];
                    ch_n[nch]++;
                  end
                end
              end
              start += sz;
            end
            nch++;
            lst_n = grp_n;
            for (int i = 0; i < grp_n; i++) lst[i] = grp[i];
          end
        end
      end

      // ---- minimise each collected set with a balanced tree ----
      for (int c = 0; c < nch; c++) begin
        cur_n = ch_n[c];
        for (int i = 0; i < cur_n; i++) cur[i] = ch_el[c*MAX_N + i];
        while (cur_n > 1) begin
          k = 0;
          for (int i = 0; i < cur_n; i += 2) begin
            if (i + 1 < cur_n) begin
              a = cur[i];
              b = cur[i+1];
              m = nmask[a] | nmask[b];
              dd = ((ndep[a] > ndep[b]) ? ndep[a] : ndep[b]) + 1;
              found = -1;
              for (int j = 0; j < num; j++)
                if (found < 0 && nmask[j] == m && ndep[j] <= dd) found = j;
              if (found < 0) begin
                nmask[num] = m;
                na[num] = a;
                nb[num] = b;
                ndep[num] = dd;
                found = num;
                num++;
              end
              cur[k] = found;
            end else begin
              cur[k] = cur[i];
            end
            k++;
          end
          cur_n = k;
        end
        ch_node[c] = cur[0];
      end

      // ---- fold the sets from the innermost outwards ----
      x = ch_node[nch-1];
      for (int c = nch - 2; c >= 0; c--) begin
        a = ch_node[c];
        b = x;
        m = nmask[a] | nmask[b];
        dd = ((ndep[a] > ndep[b]) ? ndep[a] : ndep[b]) + 1;
        found = -1;
        for (int j = 0; j < num; j++)
          if (found < 0 && nmask[j] == m && ndep[j] <= dd) found = j;
        if (found < 0) begin
          nmask[num] = m;
          na[num] = a;
          nb[num] = b;
          ndep[num] = dd;
          found = num;
          num++;
        end
        x = found;
      end
      rownode[r] = x;
    end

    maxd = 0;
    for (int r = 0; r < n; r++) if (ndep[rownode[r]] > maxd) maxd = ndep[rownode[r]];

    // pack the result; unused entries stay zero
    pa = '0;
    pb = '0;
    pr = '0;
    for (int kk = n; kk < num; kk++) begin
      pa = pa | (NODE_VEC_W'(vhc_idx_t'(na[kk])) << (kk * IDX_W));
      pb = pb | (NODE_VEC_W'(vhc_idx_t'(nb[kk])) << (kk * IDX_W));
    end
    for (int r = 0; r < n; r++) pr = pr | (ROW_VEC_W'(vhc_idx_t'(rownode[r])) << (r * IDX_W));
    return {pa, pb, pr, 16'(num), 8'(maxd)};
  endfunction

endpackage
