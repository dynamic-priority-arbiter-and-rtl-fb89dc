// fpa_mux_tree: merged fixed-priority arbiter (FPA) and multiplexer.
//
// The FPA grants the rightmost active request (position 0 has the highest
// priority). Seen as a sort, it selects the maximum single-bit number that
// lies furthest right, which a binary tree of N-1 identical cmp_node
// comparators computes. Each node's direction flag f (1 = left/higher half,
// 0 = right/lower half) also steers a 2:1 data multiplexer placed next to it,
// so the data word of the winner travels down the same path as its request
// and arrives at the root without a separate grant-driven multiplexer. The
// maximum at the root is AG ("any grant").
//
// Three grant encodings run in parallel with the tree, all driven by the same
// flags:
//   gnt_idx     weighted binary index. A node at level l contributes bit l-1
//               (its flag) and passes on the lower bits of the child it
//               selects.
//   gnt_onehot  onehot vector. A node ANDs its flag into the left half and the
//               inverted flag into the right half of its children's vectors.
//   gnt_therm   thermometer vector, ones at every position <= the grant. It
//               is the onehot circuit with the inverted-AND gates of the right
//               half replaced by OR gates.
// With no request every flag is 1, so the encodings point at the highest
// position; they are meaningful only while ag = 1.
//
// The node, the multiplexer beside it and the three grant circuits follow
// the published merged arbiter-multiplexer. Supporting an N that is not a
// power of two is this design's addition: the tree is built for the next
// power of two and the extra leaves carry no request.
//
// Purely combinational, depth ceil(log2(N)) nodes.
module fpa_mux_tree #(
  parameter int unsigned N  = 8,                   // number of inputs
  parameter int unsigned DW = 32,                  // data word width
  parameter int unsigned IW = dpa_pkg::idx_w(N)    // grant index width
) (
  input  logic [N-1:0]         req,         // (reduced) requests
  input  logic [N-1:0][DW-1:0] data_in,     // data word per input
  output logic [DW-1:0]        data_out,    // data word of the granted input
  output logic                 ag,          // any request granted
  output logic [IW-1:0]        gnt_idx,     // binary index of the grant
  output logic [N-1:0]         gnt_onehot,  // onehot grant
  output logic [N-1:0]         gnt_therm    // thermometer grant (<= index)
);

  localparam int unsigned L  = IW;       // tree levels
  localparam int unsigned NP = 1 << L;   // leaves after padding

  // g_lvl[l].g_n.g_node[j] holds node j of level l (0 = leaves, L = root):
  // its maximum mx, data word dt, binary grant ix and, over the 2**l leaves
  // below it, the onehot (oh) and thermometer (th) grant vectors.
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    if (l == 0) begin : g_n
      for (genvar j = 0; j < NP; j++) begin : g_node
        logic          mx;
        logic [DW-1:0] dt;
        logic [0:0]    oh, th;
        if (j < N) begin : g_real
          assign mx = req[j];
          assign dt = data_in[j];
        end else begin : g_pad
          assign mx = 1'b0;
          assign dt = '0;
        end
        assign oh = 1'b1;
        assign th = 1'b1;
      end
    end else begin : g_n
      localparam int unsigned H = 1 << (l - 1);  // leaves under one child
      for (genvar j = 0; j < (NP >> l); j++) begin : g_node
        logic            mx, f;
        logic [DW-1:0]   dt;
        logic [IW-1:0]   ix;
        logic [2*H-1:0]  oh, th;
        cmp_node u_cmp (
          .s_l (g_lvl[l-1].g_n.g_node[2*j+1].mx),
          .s_r (g_lvl[l-1].g_n.g_node[2*j].mx),
          .max (mx),
          .f   (f)
        );
        // data multiplexer next to the node
        assign dt = f ? g_lvl[l-1].g_n.g_node[2*j+1].dt
                      : g_lvl[l-1].g_n.g_node[2*j].dt;
        // binary grant: this node's flag is bit l-1, the lower bits come
        // from the selected child
        for (genvar b = 0; b < IW; b++) begin : g_ix
          if (b == l - 1) begin : g_own
            assign ix[b] = f;
          end else if (b < l - 1) begin : g_low
            assign ix[b] = f ? g_lvl[l-1].g_n.g_node[2*j+1].ix[b]
                             : g_lvl[l-1].g_n.g_node[2*j].ix[b];
          end else begin : g_high
            assign ix[b] = 1'b0;
          end
        end
        // onehot grant: flag into the left half, inverted flag into the right
        assign oh[2*H-1:H] = {H{f}}  & g_lvl[l-1].g_n.g_node[2*j+1].oh;
        assign oh[H-1:0]   = {H{~f}} & g_lvl[l-1].g_n.g_node[2*j].oh;
        // thermometer grant: the right half's inverted-AND becomes an OR
        assign th[2*H-1:H] = {H{f}}  & g_lvl[l-1].g_n.g_node[2*j+1].th;
        assign th[H-1:0]   = {H{f}}  | g_lvl[l-1].g_n.g_node[2*j].th;
      end
    end
  end

  assign data_out   = g_lvl[L].g_n.g_node[0].dt;
  assign ag         = g_lvl[L].g_n.g_node[0].mx;
  assign gnt_idx    = g_lvl[L].g_n.g_node[0].ix;
  assign gnt_onehot = g_lvl[L].g_n.g_node[0].oh[N-1:0];
  assign gnt_therm  = g_lvl[L].g_n.g_node[0].th[N-1:0];

endmodule
