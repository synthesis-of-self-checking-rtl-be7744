// rmn_controller -- microprogrammed controller output stage, encoded with the
// reduced (m, n)-code.
//
// A microinstruction memory holds the data bits (microoperations y1..yk) of
// each microinstruction Y0..Y(NUM_MI-1). A microinstruction address selects
// one; on the next clock edge its data bits appear on y and its control bits
// on c. The control bits are the controller's additional outputs: they are
// computed by rmn_encoder from a separate read of the memory by the same
// address, never from the y outputs, so a fault on a y line does not drag the
// matching c line along with it and stays visible to the checker.
//
// The microinstructions and the code come from the method's worked example.
// The next-address (sequencing) logic is not part of this block: the address
// comes from outside. Registered outputs, one cycle of latency; mi_valid
// qualifies the address and is delayed to out_valid. Asynchronous
// active-low reset loads Y0 (no microoperation, all control bits 1), which is
// itself a code word. Addresses at or beyond NUM_MI read Y0. These choices of
// latency, reset and out-of-range behaviour are this design's own.
module rmn_controller
  import rmn_pkg::*;
#(
  parameter int unsigned              K        = K_EX,
  parameter int unsigned              M        = M_EX,
  parameter int unsigned              NUM_MI   = NUM_MI_EX,
  parameter int unsigned              AW       = (NUM_MI > 1) ? $clog2(NUM_MI) : 1,
  parameter logic [NUM_MI-1:0][K-1:0] MI_TABLE = EX_MI_TABLE,
  parameter logic [M-1:0][K-1:0]      V_MASK   = EX_V_MASK
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          mi_valid,
  input  logic [AW-1:0] mi_addr,
  output logic [K-1:0]  y,
  output logic [M-1:0]  c,
  output logic          out_valid
);

  logic [K-1:0] y_rd;     // data-bit read port
  logic [K-1:0] y_for_c;  // second read by the same address, feeds the encoder
  logic [M-1:0] c_rd;

  always_comb begin
    y_rd    = '0;
    y_for_c = '0;
    if (int'(mi_addr) < int'(NUM_MI)) begin
      y_rd    = MI_TABLE[mi_addr];
      y_for_c = MI_TABLE[mi_addr];
    end
  end

  rmn_encoder #(
    .K     (K),
    .M     (M),
    .V_MASK(V_MASK)
  ) u_encoder (
    .y(y_for_c),
    .c(c_rd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      c         <= '1;
      out_valid <= 1'b0;
    end else begin
      out_valid <= mi_valid;
      if (mi_valid) begin
        y <= y_rd;
        c <= c_rd;
      end
    end
  end

endmodule
