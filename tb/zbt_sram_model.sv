// Behavioural model of one pipelined ZBT SRAM bank (512K x 32 by default),
// for simulation only; it stands for the external memory chip on the board.
// A command is sampled on a clock edge when cs_n and cke_n are low. Two edges
// later a write takes dq_i under the active-low byte enables bw_n, and a
// read's data is driven on dq_o during the cycle before that second edge,
// so the controller samples it on the same edge. adv_ld_n is assumed low.
// The array is initialised to zero so that every read is defined.
module zbt_sram_model #(
  parameter int unsigned ADDR_W = 19,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 1 << ADDR_W
) (
  input  logic                clk,
  input  logic [ADDR_W-1:0]   addr,
  input  logic                cs_n,
  input  logic                we_n,
  input  logic                cke_n,
  input  logic [DATA_W/8-1:0] bw_n,
  input  logic [DATA_W-1:0]   dq_i,
  output logic [DATA_W-1:0]   dq_o
);

  logic [DATA_W-1:0] mem [DEPTH];

  typedef struct packed {
    logic              valid;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W/8-1:0] bw_n;
  } cmd_t;

  cmd_t c1, c2;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    c1 = '0;
    c2 = '0;
  end

  always @(posedge clk) begin
    if (!cke_n) begin
      c1.valid <= !cs_n;
      c1.we    <= !we_n;
      c1.addr  <= addr;
      c1.bw_n  <= bw_n;
      c2 <= c1;
      if (c2.valid && c2.we && (int'(c2.addr) < DEPTH))
        for (int b = 0; b < DATA_W / 8; b++)
          if (!c2.bw_n[b]) mem[c2.addr][8*b +: 8] <= dq_i[8*b +: 8];
    end
  end

  always_comb begin
    dq_o = '0;
    if (c2.valid && !c2.we && (int'(c2.addr) < DEPTH)) dq_o = mem[c2.addr];
  end

  // Direct access for testbenches (load images, check results)
  function automatic logic [DATA_W-1:0] peek(input int unsigned a);
    return mem[a];
  endfunction

  task automatic poke(input int unsigned a, input logic [DATA_W-1:0] d);
    mem[a] = d;
  endtask

endmodule
