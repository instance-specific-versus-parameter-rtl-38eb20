// sram_model: behavioural model of the external synchronous SRAM used by the
// parameter-specific engine in simulation. Not part of the design.
// One access per clock: a write stores wdata at addr; a read returns the word
// on rdata from the next cycle on (one cycle of latency). Unwritten words read
// as zero. The testbench, acting as the host, fills and reads the memory
// directly through poke/peek while the engine is idle.
module sram_model #(
  parameter int unsigned AW = 21,
  parameter int unsigned DW = 70
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [logic [AW-1:0]];
  int unsigned   reads, writes;

  initial begin
    rdata  = '0;
    reads  = 0;
    writes = 0;
  end

  always @(posedge clk) begin
    if (en && we) begin
      mem[addr] = wdata;
      writes++;
    end else if (en) begin
      rdata <= mem.exists(addr) ? mem[addr] : '0;
      reads++;
    end
  end

  function automatic void poke(logic [AW-1:0] a, logic [DW-1:0] d);
    mem[a] = d;
  endfunction

  function automatic logic [DW-1:0] peek(logic [AW-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic void clear_all();
    mem.delete();
  endfunction

endmodule
