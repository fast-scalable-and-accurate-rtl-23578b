// pheap: pipelined binary min-heap that sorts the scheduling times of QPs.
//
// Tier 1 of the rate limiter keeps one entry per active QP here, keyed by
// the time its head packet may be sent, and the QP scheduler watches the
// root. The heap has LEVELS levels, level i holding 2^i nodes in a memory of
// its own, so it stores up to 2^LEVELS - 1 entries (32767 for 15 levels,
// enough for 16 K QPs). Every node keeps its key, its QP number and the
// number of entries in its subtree.
//
// Both operations walk the tree from the root to the leaves, one level per
// clock, so consecutive operations overlap in a pipeline:
//  * enqueue: at each level the smaller of the carried entry and the stored
//    one stays, the larger moves on into the left subtree if it has room,
//    else the right one; an empty node ends the walk.
//  * dequeue: the root is taken out and the hole left behind is filled by the
//    smaller child, level by level, until a node without children.
// Holes may therefore sit anywhere at the bottom of the tree, and the subtree
// counts, not the shape, tell where room is. A new operation may start every
// ISSUE_INTERVAL cycles (at least 2: an operation must have passed two
// levels before the next one reads them); the paper's heap starts one every
// four cycles, the default.
//
// Interface: op_ready is high when an operation may be issued this cycle;
// then enq (with enq_key, enq_qpn; ignored when full) or deq (ignored when
// empty) starts one; both high is not allowed and enq wins. root_valid,
// root_key and root_qpn show the minimum whenever op_ready is high.
// After reset the node memories are cleared, one node per level per cycle,
// taking 2^(LEVELS-1) cycles during which op_ready is low.
//
// The paper uses a pipelined heap and gives its issue rate; the walk above
// (per-level memories, subtree counts, top-down hole filling) is this
// design's reading of such a heap.
module pheap
  import tassel_pkg::*;
#(
  parameter int unsigned LEVELS         = 15,
  parameter int unsigned ISSUE_INTERVAL = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        op_ready,
  input  logic        enq,
  input  ts_t         enq_key,
  input  logic [15:0] enq_qpn,
  input  logic        deq,
  output logic        root_valid,
  output ts_t         root_key,
  output logic [15:0] root_qpn,
  output logic [LEVELS-1:0] count,
  output logic        full
);
  localparam int unsigned L  = LEVELS;
  localparam int unsigned CW = $clog2(ISSUE_INTERVAL + 1);

  typedef struct packed {
    ts_t         key;
    logic [15:0] qpn;
    logic [L-1:0] cnt;   // entries in the subtree rooted here
  } node_t;

  typedef struct packed {
    logic        valid;
    logic        deq;    // 1: fill a hole, 0: carry an entry down
    logic [L-1:0] idx;   // node index within its level
    ts_t         key;
    logic [15:0] qpn;
  } tok_t;

  tok_t  tok   [L];      // operation at each level (registered)
  tok_t  tok_n [L];      // operation passed on to the next level
  node_t self_rd [L];    // node tok[i].idx of level i
  node_t kid0 [L];       // its children, in level i+1
  node_t kid1 [L];
  logic  wr_en [L];
  node_t wr_node [L];

  // initial clearing of the node memories
  logic          init_q;
  logic [L-1:0]  init_idx;

  // issue pacing
  logic [CW-1:0] gap_q;
  logic          issue_ok;
  logic          do_enq, do_deq;

  node_t root;

  assign issue_ok   = !init_q && (gap_q == '0);
  assign full       = (root.cnt == {L{1'b1}});
  assign count      = root.cnt;
  assign op_ready   = issue_ok;
  assign root_valid = issue_ok && (root.cnt != '0);
  assign root_key   = root.key;
  assign root_qpn   = root.qpn;
  assign do_enq     = issue_ok && enq && !full;
  assign do_deq     = issue_ok && deq && !enq && (root.cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q   <= 1'b1;
      init_idx <= '0;
      gap_q    <= '0;
    end else begin
      if (init_q) begin
        init_idx <= init_idx + 1'b1;
        if (init_idx == L'((1 << (L - 1)) - 1)) init_q <= 1'b0;
      end
      if (do_enq || do_deq) gap_q <= CW'(ISSUE_INTERVAL - 1);
      else if (gap_q != '0) gap_q <= gap_q - 1'b1;
    end
  end

  // level-0 token comes from the issue port
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tok[0] <= '0;
    else begin
      tok[0].valid <= do_enq || do_deq;
      tok[0].deq   <= do_deq;
      tok[0].idx   <= '0;
      tok[0].key   <= enq_key;
      tok[0].qpn   <= enq_qpn;
    end
  end

  for (genvar i = 0; i < L; i++) begin : g_lvl
    localparam int unsigned N  = (i == 0) ? 2 : (1 << i);
    localparam int unsigned IW = (i == 0) ? 1 : i;
    localparam logic [L-1:0] CAP_CHILD = L'((1 << (L - i - 1)) - 1);

    node_t mem [N];
    logic [IW-1:0] self_idx;

    assign self_idx   = IW'(tok[i].idx);
    assign self_rd[i] = mem[self_idx];

    // children reads for the level above
    if (i > 0) begin : g_kids
      logic [IW-1:0] c0, c1;
      assign c0 = IW'({tok[i-1].idx, 1'b0});
      assign c1 = IW'({tok[i-1].idx, 1'b1});
      assign kid0[i-1] = mem[c0];
      assign kid1[i-1] = mem[c1];
    end
    if (i == 0) begin : g_root
      assign root = mem[0];
    end
    if (i == L - 1) begin : g_leaf
      assign kid0[i] = '0;
      assign kid1[i] = '0;
    end

    // the work of one level
    always_comb begin
      node_t cur;
      logic  keep_new, v0, v1, pick1;
      cur      = self_rd[i];
      wr_en[i] = 1'b0;
      wr_node[i] = cur;
      tok_n[i] = '0;
      keep_new = 1'b0;
      v0 = kid0[i].cnt != '0;
      v1 = kid1[i].cnt != '0;
      pick1 = 1'b0;
      if (tok[i].valid && !tok[i].deq) begin
        wr_en[i] = 1'b1;
        if (cur.cnt == '0) begin
          wr_node[i] = '{key: tok[i].key, qpn: tok[i].qpn, cnt: L'(1)};
        end else begin
          keep_new = time_before(tok[i].key, cur.key);
          wr_node[i].cnt = cur.cnt + 1'b1;
          if (keep_new) begin
            wr_node[i].key = tok[i].key;
            wr_node[i].qpn = tok[i].qpn;
          end
          tok_n[i].valid = 1'b1;
          tok_n[i].deq   = 1'b0;
          tok_n[i].key   = keep_new ? cur.key : tok[i].key;
          tok_n[i].qpn   = keep_new ? cur.qpn : tok[i].qpn;
          tok_n[i].idx   = {tok[i].idx[L-2:0], (kid0[i].cnt < CAP_CHILD) ? 1'b0 : 1'b1};
        end
      end else if (tok[i].valid && tok[i].deq) begin
        wr_en[i] = 1'b1;
        if (!v0 && !v1) begin
          wr_node[i].cnt = '0;
        end else begin
          pick1 = !v0 || (v1 && time_before(kid1[i].key, kid0[i].key));
          wr_node[i].key = pick1 ? kid1[i].key : kid0[i].key;
          wr_node[i].qpn = pick1 ? kid1[i].qpn : kid0[i].qpn;
          wr_node[i].cnt = cur.cnt - 1'b1;
          tok_n[i].valid = 1'b1;
          tok_n[i].deq   = 1'b1;
          tok_n[i].idx   = {tok[i].idx[L-2:0], pick1};
        end
      end
    end

    always_ff @(posedge clk) begin
      if (init_q) mem[IW'(init_idx)] <= '0;
      else if (wr_en[i]) mem[self_idx] <= wr_node[i];
    end

    if (i < L - 1) begin : g_pass
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) tok[i+1] <= '0;
        else        tok[i+1] <= tok_n[i];
    end
  end

  // a deeper level never receives an operation before the node memories
  // are cleared, and an enqueue never reaches a full leaf
  always_ff @(posedge clk)
    if (rst_n && tok[L-1].valid && !tok[L-1].deq)
      assert (self_rd[L-1].cnt == '0) else $error("pheap: enqueue ran past the leaves");
endmodule
