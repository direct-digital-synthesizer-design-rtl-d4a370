// Tree decoder: drives exactly one of 2^ADDR_W word lines high.
//
// The decoder is a binary tree of pass switches whose root is tied high.  The
// tree is walked from the address LSB upward: level k splits every live branch
// into the branch for addr[k] = 0 and the branch for addr[k] = 1, so after
// ADDR_W levels the only live leaf is the one whose index equals the address.
// In the transistor circuit each leaf line also has a pull-down and a
// restoring inverter pair so that unselected lines read as 0; in this logic
// model unselected leaves are simply 0.
//
// Interface: addr (ADDR_W bits) in, word_line (2^ADDR_W bits, one-hot) out.
// Timing: purely combinational.
//
// The 6-input, 64-output size and the LSB-first tree follow the DDS ROM
// design; the loop form of the tree is this implementation's own.
module tree_decoder #(
  parameter int unsigned ADDR_W = 6
) (
  input  logic [ADDR_W-1:0]      addr,
  output logic [(1<<ADDR_W)-1:0] word_line
);

  logic [(1<<ADDR_W)-1:0] level_cur, level_nxt;

  always_comb begin
    level_cur    = '0;
    level_cur[0] = 1'b1;                       // root tied to the supply
    for (int unsigned k = 0; k < ADDR_W; k++) begin
      level_nxt = '0;
      for (int unsigned j = 0; j < (1 << k); j++) begin
        level_nxt[j]            = level_cur[j] & ~addr[k];
        level_nxt[j + (1 << k)] = level_cur[j] &  addr[k];
      end
      level_cur = level_nxt;
    end
    word_line = level_cur;
  end

endmodule
