// Behavioural model of one byte-wide memory chip, for simulation only.
//
// A synchronous RAM: with en_i high at a clock edge it writes wdata_i when
// we_i is high, otherwise it returns the addressed byte on rdata_o after
// that edge.  Storage is sparse (an associative array), so the full
// 2**ADDR_W address space can be modelled.  Words never written read as 0,
// which is a valid codeword.  Loss of power (power_i low) erases the whole
// chip: while unpowered, writes are lost and reads return garbage, and after
// power returns every word not yet rewritten reads as a pseudo-random byte.
// flip_bit() injects a single event upset.
module mem_chip_model #(
  parameter int unsigned ADDR_W = 29,
  parameter logic [7:0]  SEED   = 8'h5a
) (
  input  logic              clk,
  input  logic              power_i,
  input  logic              en_i,
  input  logic              we_i,
  input  logic [ADDR_W-1:0] addr_i,
  input  logic [7:0]        wdata_i,
  output logic [7:0]        rdata_o
);

  logic [7:0] mem [logic [ADDR_W-1:0]];
  bit         wiped = 1'b0;

  function automatic logic [7:0] garbage(logic [ADDR_W-1:0] a);
    logic [31:0] h = 32'(a) * 32'h9e37_79b1 ^ {4{SEED}};
    return h[23:16] ^ h[7:0] ^ 8'h01;
  endfunction

  function automatic logic [7:0] peek(logic [ADDR_W-1:0] a);
    if (mem.exists(a)) return mem[a];
    return wiped ? garbage(a) : 8'h00;
  endfunction

  task automatic flip_bit(logic [ADDR_W-1:0] a, int unsigned b);
    mem[a] = peek(a) ^ (8'h01 << b);
  endtask

  always @(negedge power_i) begin
    mem.delete();
    wiped = 1'b1;
  end

  always @(posedge clk) begin
    if (en_i) begin
      if (!power_i) begin
        rdata_o <= garbage(addr_i) ^ 8'hff;
      end else if (we_i) begin
        mem[addr_i] = wdata_i;
      end else begin
        rdata_o <= peek(addr_i);
      end
    end
  end

endmodule
