// sd_pg_tree: reduces WIDTH bit-level (g,p) pairs to the single group pair
// (G,P) of the whole field, G = carry out of the field with no carry in,
// P = an incoming carry would pass through the field.
//
// The tree merges neighbouring nodes pairwise, level by level, starting from
// the least significant end; a node left without a partner moves up a level
// unchanged. For 8 bits this gives the three-level tree of pairs, quads and
// the full byte; for 7 bits it gives (6)(5:4)(3:2)(1:0) -> (6:4)(3:0) ->
// (6:0). Both shapes match the carry trees drawn for the sign detector with
// n = 8. Depth is ceil(log2(WIDTH)) merge levels.
//
// Interface: pg_in[i] is the pair of bit i (bit 0 least significant);
// grp is the group pair of bits WIDTH-1:0. Purely combinational.
module sd_pg_tree
  import rns_sd_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  pg_t [WIDTH-1:0] pg_in,
  output pg_t             grp
);

  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  // Number of nodes left after lvl merge levels: ceil(WIDTH / 2^lvl).
  function automatic int unsigned nodes_at(input int unsigned lvl);
    return (WIDTH + (1 << lvl) - 1) >> lvl;
  endfunction

  if (WIDTH == 1) begin : g_single
    assign grp = pg_in[0];
  end else begin : g_tree
    pg_t [WIDTH-1:0] node;

    always_comb begin
      node = pg_in;
      for (int unsigned l = 0; l < LEVELS; l++) begin
        // Node k of the next level covers nodes 2k+1 and 2k of this level.
        // Writing in increasing k never overwrites a node still to be read.
        for (int unsigned k = 0; k < WIDTH; k++) begin
          if (k < nodes_at(l + 1)) begin
            if (2 * k + 1 < nodes_at(l)) node[k] = pg_merge(node[2*k+1], node[2*k]);
            else                         node[k] = node[2*k];
          end
        end
      end
      grp = node[0];
    end
  end

endmodule
