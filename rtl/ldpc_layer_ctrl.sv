// ldpc_layer_ctrl: sequencer of the layered min-sum decoder.
//
// It walks the decoding procedure: initialisation (load), then the layers in
// order, layer 0 .. NL-1, repeated ITER times (the feedback loop), then the
// final decision. With the defaults NL = 2 and ITER = 2 this is: load,
// layer 1, layer 2, layer 1, layer 2, decide.
//
// Interface and timing: while idle (ready high) a start pulse asserts load
// in the same cycle and the controller enters RUN. In RUN one layer is
// processed per clock (run high, layer/iter give the position). After the
// last layer of the last iteration it spends one cycle in DONE with decide
// high, then returns to idle. From start to decide is NL*ITER+1 cycles.
// One layer per clock and the start/ready handshake are this design's
// choices; the order of the steps follows the decoding procedure.
module ldpc_layer_ctrl #(
  parameter int unsigned NL   = 2,
  parameter int unsigned ITER = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          ready,
  output logic                          load,
  output logic                          run,
  output logic [$clog2(NL+1)-1:0]       layer,
  output logic [$clog2(ITER+1)-1:0]     iter,
  output logic                          decide
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;
  state_t state;

  localparam logic [$clog2(NL+1)-1:0]   LAST_LAYER = ($clog2(NL+1))'(NL - 1);
  localparam logic [$clog2(ITER+1)-1:0] LAST_ITER  = ($clog2(ITER+1))'(ITER - 1);

  assign ready  = (state == S_IDLE);
  assign load   = ready && start;
  assign run    = (state == S_RUN);
  assign decide = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      layer <= '0;
      iter  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          layer <= '0;
          iter  <= '0;
        end
        S_RUN: begin
          if (layer == LAST_LAYER) begin
            layer <= '0;
            if (iter == LAST_ITER) state <= S_DONE;
            else                   iter  <= iter + 1'b1;
          end else begin
            layer <= layer + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // run and load are never active together, and layer stays in range.
  assert property (@(posedge clk) disable iff (!rst_n) !(run && load));
  assert property (@(posedge clk) disable iff (!rst_n) run |-> (layer <= LAST_LAYER));

endmodule
