// clksync_pkg -- types and constant functions shared by the clock synchronization design.
//
// The clock network groups N clocks into M1 clusters of P1 clocks followed by M2 clusters of
// P2 clocks (clusters are numbered from 0 here; the text of the method numbers them from 1).
// Every clock receives all clocks of its own cluster and, from each other cluster k, the clock
// number (i mod p_k) of that cluster, where i is the receiving clock's cluster. The functions
// below give that connection pattern so that the network, its nodes and the testbenches all
// elaborate the same wiring. They are pure constant functions: they are evaluated at
// elaboration and produce no hardware.
package clksync_pkg;

  // Which of the three reference rules of the selector was applied in a global clock cycle.
  //   RULE_SLOW : own clock at position x >= n-m, reference is the (m+1)th clock
  //   RULE_FAST : own clock at position x <= 2m,  reference is the (2m+1)th clock
  //   RULE_MID  : otherwise,                      reference is the (2m)th clock
  typedef enum logic [1:0] {
    RULE_NONE = 2'd0,
    RULE_SLOW = 2'd1,
    RULE_FAST = 2'd2,
    RULE_MID  = 2'd3
  } rule_e;

  // Width of an index that can hold 0..n-1 (at least one bit).
  function automatic int idx_w(input int n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // Smallest power of two that is >= n and >= 2 (the width of the sorting network).
  function automatic int pow2_ceil(input int n);
    int p;
    p = 2;
    while (p < n) p = p * 2;
    return p;
  endfunction

  function automatic int num_clusters(input int m1, input int m2);
    return m1 + m2;
  endfunction

  function automatic int num_clocks(input int m1, input int p1, input int m2, input int p2);
    return m1 * p1 + m2 * p2;
  endfunction

  // Size of cluster c.
  function automatic int cluster_size(input int c, input int m1, input int p1, input int p2);
    return (c < m1) ? p1 : p2;
  endfunction

  // Global index of the first clock of cluster c.
  function automatic int cluster_base(input int c, input int m1, input int p1, input int p2);
    return (c < m1) ? c * p1 : m1 * p1 + (c - m1) * p2;
  endfunction

  // Cluster that global clock g belongs to.
  function automatic int cluster_of(input int g, input int m1, input int p1, input int m2,
                                    input int p2);
    for (int c = 0; c < m1 + m2; c++)
      if (g >= cluster_base(c, m1, p1, p2) && g < cluster_base(c, m1, p1, p2) + cluster_size(c, m1, p1, p2))
        return c;
    return 0;
  endfunction

  // 1 when clock src is an input of clock dst (dst == src counts: a clock sees itself).
  function automatic bit connected(input int dst, input int src, input int m1, input int p1,
                                   input int m2, input int p2);
    int cd, cs, member;
    cd = cluster_of(dst, m1, p1, m2, p2);
    cs = cluster_of(src, m1, p1, m2, p2);
    if (cd == cs) return 1'b1;
    member = src - cluster_base(cs, m1, p1, p2);
    return member == (cd % cluster_size(cs, m1, p1, p2));
  endfunction

  // Number of inputs of clock dst, itself included (n of its synchronization node).
  function automatic int fan_in(input int dst, input int m1, input int p1, input int m2,
                                input int p2);
    int n;
    n = 0;
    for (int s = 0; s < num_clocks(m1, p1, m2, p2); s++)
      if (connected(dst, s, m1, p1, m2, p2)) n++;
    return n;
  endfunction

  // Position of clock dst itself among its inputs, taken in global index order.
  function automatic int self_pos(input int dst, input int m1, input int p1, input int m2,
                                  input int p2);
    int n;
    n = 0;
    for (int s = 0; s < dst; s++)
      if (connected(dst, s, m1, p1, m2, p2)) n++;
    return n;
  endfunction

  // Global index of the k-th input of clock dst, itself excluded, in global index order.
  function automatic int nth_source(input int dst, input int k, input int m1, input int p1,
                                    input int m2, input int p2);
    int n;
    n = 0;
    for (int s = 0; s < num_clocks(m1, p1, m2, p2); s++)
      if (s != dst && connected(dst, s, m1, p1, m2, p2)) begin
        if (n == k) return s;
        n++;
      end
    return 0;
  endfunction

  // Total number of interconnections J, every clock counting itself as one input:
  // J = N(M1 + M2 - 1) + M1*P1^2 + M2*P2^2.
  function automatic int total_links(input int m1, input int p1, input int m2, input int p2);
    return num_clocks(m1, p1, m2, p2) * (m1 + m2 - 1) + m1 * p1 * p1 + m2 * p2 * p2;
  endfunction

endpackage
