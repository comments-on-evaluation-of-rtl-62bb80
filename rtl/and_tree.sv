// and_tree: N-input AND as a balanced tree of two-input AND gates.
//
// Level 0 holds the N inputs. Each further level ANDs neighbouring pairs of
// the level below (2i and 2i+1); an element left without a partner is passed
// up unchanged. After ceil(log2 N) levels a single bit remains, the AND of all
// inputs. Purely combinational: x in, y out, ceil(log2 N) gate delays.
module and_tree #(
  parameter int N = 32
) (
  input  logic [N-1:0] x,
  output logic         y
);

  localparam int DEPTH = $clog2(N);

  // Number of nodes at level l: ceil(N / 2^l).
  function automatic int width_at(input int l);
    return (N + (1 << l) - 1) >> l;
  endfunction

  for (genvar l = 0; l <= DEPTH; l++) begin : g_lvl
    logic [width_at(l)-1:0] v;
    if (l == 0) begin : g_in
      assign v = x;
    end else begin : g_and
      for (genvar i = 0; i < width_at(l); i++) begin : g_node
        if (2 * i + 1 < width_at(l - 1)) begin : g_pair
          assign v[i] = g_lvl[l-1].v[2*i] & g_lvl[l-1].v[2*i+1];
        end else begin : g_odd
          assign v[i] = g_lvl[l-1].v[2*i];
        end
      end
    end
  end

  assign y = g_lvl[DEPTH].v[0];

endmodule
