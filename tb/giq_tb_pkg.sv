// giq_tb_pkg: reference models used by the GIQ testbenches.
//
// sg_eval   evaluates an n-line switch graph G_n(D, S) straight from its
//           definition (which node is joined to which), for both directions
//           of every line, independently of the multiplexer structure of the
//           RTL switches.
// layout    the off-line layout procedure: from a linearized graph (nodes
//           0..nn-1 in line order, undirected edges) it splits every node into
//           one subnode per incident edge (neighbours in left-to-right order),
//           pairs each edge's left and right subnode, then scans the subnodes
//           keeping the edges that hang over the scan point in a list sorted
//           by right subnode. An edge's insertion position in that list is
//           its crossing number plus one, which is the setting of the INSERT
//           switch at its source; the destination switch always REMOVEs from
//           position 1. Subnode j of node u goes to switch u*ports + j,
//           or, with ports = 0, every subnode to its own switch in scan order.
// A plain sorted array is enough here; the insertion rank is what matters.
package giq_tb_pkg;

  localparam int MAXL = 32;    // most lines
  localparam int MAXN = 64;    // most nodes
  localparam int MAXD = 8;     // most edges at one node
  localparam int MAXS = 512;   // most subnodes / switches

  typedef int lines_t [MAXL];

  // Node numbering inside sg_eval: 0 = port, 1..n = left, n+1..2n = right.
  function automatic void sg_eval(input int n, input bit dir_right, input int s,
                                  input lines_t fl, input lines_t br, input int pin,
                                  output lines_t fr, output lines_t bl, output int pout);
    int partner [2*MAXL+1];
    for (int i = 0; i <= 2*n; i++) partner[i] = -1;
    if (s == 0) begin
      for (int k = 1; k <= n; k++) begin partner[k] = n + k; partner[n + k] = k; end
    end else begin
      // E0: port to N_{D,S}
      int nd;
      nd = dir_right ? n + s : s;
      partner[0] = nd; partner[nd] = 0;
      for (int i = 1; i < s; i++) begin partner[i] = n + i; partner[n + i] = i; end
      for (int j = s; j < n; j++) begin
        // N_{D',j} -- N_{D,j+1}
        int a, b;
        a = dir_right ? j : n + j;
        b = dir_right ? n + j + 1 : j + 1;
        partner[a] = b; partner[b] = a;
      end
    end
    for (int j = 1; j <= n; j++) begin
      int p;
      p = partner[n + j];
      fr[j-1] = (p == 0) ? pin : (p >= 1 && p <= n) ? fl[p-1] : 0;
      p = partner[j];
      bl[j-1] = (p == 0) ? pin : (p > n) ? br[p-n-1] : 0;
    end
    pout = (partner[0] < 0) ? 0 : (partner[0] <= n) ? fl[partner[0]-1] : br[partner[0]-n-1];
  endfunction

  // Result of the layout procedure.
  typedef struct {
    int  nedges;
    int  cutwidth;
    int  esrc [MAXS];      // switch index of each edge's source (INSERT)
    int  edst [MAXS];      // switch index of each edge's destination (REMOVE)
    bit  remove [MAXS];    // per switch
    int  setting [MAXS];   // per switch: insert position, 0 = none
    int  nsub;             // number of subnodes
    int  sub_slot [MAXS];  // switch of each subnode in scan order
    bit  ok;               // degree and cutwidth fit the array
  } layout_t;

  function automatic void layout(input int nn, input int ne, input int eu[MAXS], input int ev[MAXS],
                                 input int ports, input int lines, output layout_t res);
    int adj [MAXN][MAXD];
    int deg [MAXN];
    int first_sub [MAXN];
    int s_nbr [MAXS], s_slot [MAXS], s_right [MAXS];
    bit s_ins [MAXS];
    int hang [$];
    int ns;
    res.ok = 1;
    res.nedges = ne;
    res.cutwidth = 0;
    for (int i = 0; i < MAXS; i++) begin res.remove[i] = 0; res.setting[i] = 0; end
    for (int u = 0; u < nn; u++) deg[u] = 0;
    for (int e = 0; e < ne; e++) begin
      if (deg[eu[e]] >= MAXD || deg[ev[e]] >= MAXD) begin res.ok = 0; return; end
      adj[eu[e]][deg[eu[e]]++] = ev[e];
      adj[ev[e]][deg[ev[e]]++] = eu[e];
    end
    // SPLIT-GRAPH: neighbours in left-to-right order
    ns = 0;
    for (int u = 0; u < nn; u++) begin
      for (int i = 1; i < deg[u]; i++)
        for (int j = deg[u] - 1; j >= i; j--)
          if (adj[u][j-1] > adj[u][j]) begin
            int t; t = adj[u][j]; adj[u][j] = adj[u][j-1]; adj[u][j-1] = t;
          end
      if (ports > 0 && deg[u] > ports) res.ok = 0;
      first_sub[u] = ns;
      for (int i = 0; i < deg[u]; i++) begin
        s_nbr[ns] = adj[u][i];
        s_ins[ns]  = adj[u][i] > u;
        s_slot[ns] = (ports == 0) ? ns : u * ports + i;
        ns++;
      end
    end
    res.nsub = ns;
    for (int s = 0; s < ns; s++) res.sub_slot[s] = s_slot[s];
    // LABEL-EDGES
    for (int s = 0; s < ns; s++)
      if (s_ins[s]) begin
        s_right[s] = first_sub[s_nbr[s]];
        first_sub[s_nbr[s]]++;
      end
    // COMPUTE-CROSSINGS
    begin
      int e;
      e = 0;
      for (int s = 0; s < ns; s++) begin
        if (s_ins[s]) begin
          int pos;
          pos = 0;
          while (pos < hang.size() && hang[pos] < s_right[s]) pos++;
          hang.insert(pos, s_right[s]);
          res.setting[s_slot[s]] = pos + 1;
          res.esrc[e] = s_slot[s];
          res.edst[e] = s_slot[s_right[s]];
          e++;
          if (hang.size() > res.cutwidth) res.cutwidth = hang.size();
        end else begin
          if (hang.size() == 0 || hang[0] != s) res.ok = 0;
          else void'(hang.pop_front());
          res.remove[s_slot[s]] = 1;
        end
      end
    end
    if (res.cutwidth > lines) res.ok = 0;
  endfunction

  // Configuration word of one port switch: {remove, insert thermometer}.
  function automatic logic [MAXL:0] cfg_word(input bit rm, input int setting, input int lines);
    logic [MAXL:0] w;
    w = '0;
    for (int k = 1; k <= lines; k++) w[k-1] = (setting != 0) && (k >= setting);
    w[lines] = rm;
    return w;
  endfunction

  // Random linearized graph with at most maxdeg edges per node and cutwidth
  // at most lines; edges (u, v) with u < v, no duplicates.
  function automatic void random_graph(input int nn, input int maxdeg, input int lines,
                                       input int tries, output int ne,
                                       output int eu[MAXS], output int ev[MAXS]);
    int deg [MAXN];
    int gap [MAXN];
    ne = 0;
    for (int i = 0; i < nn; i++) begin deg[i] = 0; gap[i] = 0; end
    for (int t = 0; t < tries; t++) begin
      int u, v, span;
      bit fits;
      u = $urandom_range(nn - 2, 0);
      span = ($urandom_range(3, 0) == 0) ? $urandom_range(nn - 1 - u, 1)
                                          : $urandom_range((nn - 1 - u < 4) ? nn - 1 - u : 4, 1);
      v = u + span;
      fits = deg[u] < maxdeg && deg[v] < maxdeg;
      for (int g = u; g < v; g++) if (gap[g] >= lines) fits = 0;
      for (int e = 0; e < ne; e++) if (eu[e] == u && ev[e] == v) fits = 0;
      if (fits) begin
        eu[ne] = u; ev[ne] = v; ne++;
        deg[u]++; deg[v]++;
        for (int g = u; g < v; g++) gap[g]++;
      end
    end
  endfunction

endpackage
