// sync_fifo: small synchronous first-in first-out buffer.
// Write when 'push', read the head combinationally from 'dout' and remove it
// with 'pop'. 'count' gives the number of entries; pushing when full or
// popping when empty is a protocol error, checked by assertions.
module sync_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic                     push,
  input  logic [WIDTH-1:0]         din,
  input  logic                     pop,
  output logic [WIDTH-1:0]         dout,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rp, wp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; count <= '0;
    end else if (flush) begin
      rp <= '0; wp <= '0; count <= '0;
    end else begin
      if (push) begin
        mem[wp] <= din;
        wp      <= (32'(wp) == DEPTH-1) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (32'(rp) == DEPTH-1) ? '0 : rp + 1'b1;
      count <= count + (push ? ($clog2(DEPTH+1))'(1) : '0) - (pop ? ($clog2(DEPTH+1))'(1) : '0);
    end
  end

  assign dout = mem[rp];

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (32'(count) < DEPTH || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> count != 0);
endmodule
