// Control unit of the BEC scalar multiplier: sequences the blinded
// Montgomery power ladder (bMPL).
//
//   LOAD   1 cycle     R0 <= R, R1 <= P, R_R <= -R
//   INIT   11 layers   R1 <= R0 + R1            (= R + P)
//   FIRST  15 layers   first ladder round, bit e[T-1]
//   LOOP   14 layers   each of the rounds for bits e[T-2] .. e[0]
//   FINAL  11 layers   R0 <= R0 + R_R           (= e*P)
//
// In every round the same operations run whatever the key bit: one point
// addition and two doublings; the bit only steers which ladder register is
// read and written (bit_b, see bec_datapath). The scalar is kept in a shift
// register and consumed most significant bit first.
//
// Interface: start is accepted when idle (busy low); done pulses for one
// cycle 25 + 14*T clock edges after the edge at which start was
// accepted, and the result is then held in the datapath's R0 until the next
// start. The round structure and layer counts follow the document; the
// separate INIT and FINAL additions, their 11 layers and the handshake are
// this design's own.
module bec_ctrl
  import bec_pkg::*;
#(
  parameter int unsigned T = 233           // scalar length in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [T-1:0] e,
  output logic         load,
  output logic         exec,
  output prog_e        prog,
  output logic [3:0]   layer,
  output logic         bit_b,
  output logic         final_pa,
  output logic         busy,
  output logic         done
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_INIT, S_FIRST, S_LOOP, S_FINAL
  } state_e;

  localparam int unsigned CW = $clog2(T + 1);

  state_e        state;
  logic [T-1:0]  esh;
  logic [CW-1:0] rounds_left;   // ladder rounds still to run after this one
  logic          last_layer;

  always_comb begin
    unique case (state)
      S_FIRST: prog = PROG_FIRST;
      S_LOOP:  prog = PROG_STEADY;
      default: prog = PROG_PA;
    endcase
  end

  assign last_layer = (32'(layer) == prog_layers(prog) - 1);
  assign load       = (state == S_LOAD);
  assign exec       = (state == S_INIT) || (state == S_FIRST) ||
                      (state == S_LOOP) || (state == S_FINAL);
  assign bit_b      = ((state == S_FIRST) || (state == S_LOOP)) ? esh[T-1] : 1'b0;
  assign final_pa   = (state == S_FINAL);
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      layer       <= '0;
      esh         <= '0;
      rounds_left <= '0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            esh   <= e;
            state <= S_LOAD;
          end
        end
        S_LOAD: begin
          layer <= '0;
          state <= S_INIT;
        end
        default: begin
          if (!last_layer) begin
            layer <= layer + 4'd1;
          end else begin
            layer <= '0;
            unique case (state)
              S_INIT: begin
                rounds_left <= CW'(T - 1);
                state       <= S_FIRST;
              end
              S_FIRST, S_LOOP: begin
                esh <= esh << 1;
                if (rounds_left == '0) begin
                  state <= S_FINAL;
                end else begin
                  rounds_left <= rounds_left - 1'b1;
                  state       <= S_LOOP;
                end
              end
              default: begin          // S_FINAL
                done  <= 1'b1;
                state <= S_IDLE;
              end
            endcase
          end
        end
      endcase
    end
  end

  // A layer number never runs past the end of its program. (The assertion's
  // disable iff uses the reset synchronously, which lint reports as a reset
  // used both ways; it affects only the check, not the logic.)
  a_layer_in_range: assert property (
    @(posedge clk) disable iff (!rst_n) exec |-> 32'(layer) < prog_layers(prog)
  ) else $error("layer %0d out of range for program %0d", layer, prog);

endmodule
