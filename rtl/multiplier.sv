// multiplier: unsigned DW x DW Wallace-tree multiplier.
//
// The DW*DW partial-product bits a[i]&b[j] are placed in the columns of weight
// i+j. Each reduction layer then works column by column: every group of three
// bits goes through a full adder (sum stays in the column, carry moves to the
// next column), a remaining pair goes through a half adder, and a single bit
// passes on. Layers repeat until no column holds more than two bits; the two
// remaining rows are added by one carry-propagate adder. The column heights are
// fixed by DW, so the loops below unroll into a fixed network of adders.
// Only the multiplier type is given for this design; the reduction follows the
// textbook Wallace scheme. Purely combinational.
module multiplier #(
  parameter int unsigned DW = 8
) (
  input  logic [DW-1:0]   a,
  input  logic [DW-1:0]   b,
  output logic [2*DW-1:0] p
);

  localparam int unsigned PW     = 2 * DW;
  localparam int unsigned MAXH   = 2 * DW;          // enough for every layer
  localparam int unsigned LAYERS = 2 * DW;           // bound; extra layers are empty

  always_comb begin
    logic [MAXH-1:0] col  [PW];
    logic [MAXH-1:0] nxt  [PW];
    int unsigned     h    [PW];
    int unsigned     nh   [PW];
    logic [PW-1:0]   row0, row1;
    int unsigned     j;
    logic            x, y, z;

    x    = 1'b0;
    y    = 1'b0;
    z    = 1'b0;
    j    = 0;
    row0 = '0;
    row1 = '0;
    for (int c = 0; c < PW; c++) begin
      col[c] = '0;
      h[c]   = 0;
    end
    for (int i = 0; i < DW; i++) begin
      for (int k = 0; k < DW; k++) begin
        col[i+k][h[i+k]] = a[i] & b[k];
        h[i+k] = h[i+k] + 1;
      end
    end

    for (int l = 0; l < LAYERS; l++) begin
      for (int c = 0; c < PW; c++) begin
        nxt[c] = '0;
        nh[c]  = 0;
      end
      for (int c = 0; c < PW; c++) begin
        j = 0;
        if (h[c] > 2) begin
          // full adders on groups of three
          for (int g = 0; g < MAXH / 3; g++) begin
            if (j + 3 <= h[c]) begin
              x = col[c][j];
              y = col[c][j+1];
              z = col[c][j+2];
              nxt[c][nh[c]] = x ^ y ^ z;
              nh[c] = nh[c] + 1;
              if (c + 1 < PW) begin
                nxt[c+1][nh[c+1]] = (x & y) | (z & (x ^ y));
                nh[c+1] = nh[c+1] + 1;
              end
              j = j + 3;
            end
          end
          // half adder on a remaining pair
          if (j + 2 == h[c]) begin
            x = col[c][j];
            y = col[c][j+1];
            nxt[c][nh[c]] = x ^ y;
            nh[c] = nh[c] + 1;
            if (c + 1 < PW) begin
              nxt[c+1][nh[c+1]] = x & y;
              nh[c+1] = nh[c+1] + 1;
            end
            j = j + 2;
          end
        end
        // bits not reduced in this layer pass through (bits above h[c] are 0)
        nxt[c] = nxt[c] | ((col[c] >> j) << nh[c]);
        nh[c]  = nh[c] + (h[c] - j);
      end
      for (int c = 0; c < PW; c++) begin
        col[c] = nxt[c];
        h[c]   = nh[c];
      end
    end

    for (int c = 0; c < PW; c++) begin
      row0[c] = (h[c] > 0) ? col[c][0] : 1'b0;
      row1[c] = (h[c] > 1) ? col[c][1] : 1'b0;
    end
    p = row0 + row1;
  end

endmodule
