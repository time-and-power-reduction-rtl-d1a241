// prog_mem_model - behavioural model of the core's program memory (testbench only).
//
// A 64K x 16 synchronous-read memory: when req is high at a rising clock edge,
// the word at addr appears on data after that edge and stays until the next
// read. The testbench fills mem[] directly. The model also counts reads and
// the bit toggles between consecutive reads on the address and data lines, as
// a measure of the switching activity on the program buses.
module prog_mem_model #(
  parameter int unsigned AW = 16,
  parameter int unsigned W  = 16
) (
  input  logic          clk,
  input  logic          req,
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  data
);

  logic [W-1:0]  mem [2**AW];
  logic [AW-1:0] last_addr = '0;
  int unsigned   reads = 0;
  int unsigned   addr_toggles = 0;
  int unsigned   data_toggles = 0;

  initial data = '0;

  always @(posedge clk) begin
    if (req) begin
      addr_toggles <= addr_toggles + $countones(addr ^ last_addr);
      data_toggles <= data_toggles + $countones(mem[addr] ^ data);
      last_addr    <= addr;
      data         <= mem[addr];
      reads        <= reads + 1;
    end
  end

  function automatic void clear_counts();
    reads = 0;
    addr_toggles = 0;
    data_toggles = 0;
  endfunction

endmodule
