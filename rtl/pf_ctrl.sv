// pf_ctrl: control unit of the pi-function core.
//
// One pi-function call runs three rounds; a round is eight *-operations on the ARX engine
// over the four chunks I1..I4 of the 256-bit state (C1, C2 are the round's constants):
//   forward:  J1 = C1 * I1,  Ji = J(i-1) * Ii          (results to the intermediate words)
//   backward: J4 = J4 * C2,  Ji = Ji * J(i+1), i=3..1  (results overwrite the state words)
// In the forward chain the constant or previous result enters the engine's X port and the
// input chunk its Y port; in the backward chain the forward result enters X and the
// constant or newer result enters Y.
//
// Phases: IN (16 cycles: ISTRM words written to the state, IOENA[0] high), then per
// operation LOAD (ARX_Load for one cycle), FEED (4 cycles: ADDR_PA/ADDR_PB walk the X and Y
// chunks) and WAIT (until ARX_Flag; while it is high WRENA and IOSEL write the engine's
// four result words back at ADDR_PA), then OUT (16 cycles: IOENA[1] high, ADDR_PO walks the
// state) and DONE (pi_Flag for one cycle). pi_Flag is high 16 + 24*16 + 16 + 1 = 417
// cycles after the cycle in which Start is high. WRENA follows ARX_Flag combinationally in WAIT so
// that the first result word is not missed; all other outputs depend on the state only.
// This phase/counter organisation is this design's own; Start is ignored unless idle.
module pf_ctrl
  import pi16_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       arx_flag,
  output logic       arx_load,
  output logic [5:0] addr_pa,
  output logic [5:0] addr_pb,
  output logic [3:0] addr_po,
  output logic       wrena,
  output logic       iosel,
  output logic [1:0] ioena,     // [0]: ISTRM word taken, [1]: PO word valid
  output logic       pi_flag
);

  typedef enum logic [2:0] {S_IDLE, S_IN, S_LOAD, S_FEED, S_WAIT, S_OUT, S_DONE} state_t;

  state_t     state;
  logic [3:0] cnt;
  logic [2:0] op;     // operation in the round: 0..3 forward, 4..7 backward
  logic [1:0] rnd;

  // chunk base addresses of the current operation
  logic [5:0] xbase, ybase, wbase;
  logic [1:0] ci;     // chunk index i-1 of the operation

  always_comb begin
    logic [5:0] rc1, rc2;
    rc1 = 6'(PF_RC_BASE + 8 * rnd);
    rc2 = rc1 + 6'd4;
    if (!op[2]) begin
      ci    = op[1:0];
      xbase = (ci == 2'd0) ? rc1 : 6'(PF_TMP_BASE) + 6'({ci - 2'd1, 2'b00});
      ybase = 6'(PF_STATE_BASE) + 6'({ci, 2'b00});
      wbase = 6'(PF_TMP_BASE) + 6'({ci, 2'b00});
    end else begin
      ci    = 2'd3 - op[1:0];
      xbase = 6'(PF_TMP_BASE) + 6'({ci, 2'b00});
      ybase = (ci == 2'd3) ? rc2 : 6'(PF_STATE_BASE) + 6'({ci + 2'd1, 2'b00});
      wbase = 6'(PF_STATE_BASE) + 6'({ci, 2'b00});
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      op    <= '0;
      rnd   <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          cnt <= '0; op <= '0; rnd <= '0;
          if (start) state <= S_IN;
        end
        S_IN: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) state <= S_LOAD;
        end
        S_LOAD: begin
          cnt   <= '0;
          state <= S_FEED;
        end
        S_FEED: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd3) begin
            cnt   <= '0;
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (arx_flag) begin
            cnt <= cnt + 4'd1;
            if (cnt == 4'd3) begin
              cnt <= '0;
              op  <= op + 3'd1;
              if (op == 3'd7) begin
                if (rnd == 2'(N_ROUNDS - 1)) state <= S_OUT;
                else begin
                  rnd   <= rnd + 2'd1;
                  state <= S_LOAD;
                end
              end else state <= S_LOAD;
            end
          end
        end
        S_OUT: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) state <= S_DONE;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // the engine may only answer while the unit waits for it
  a_flag_in_wait: assert property (@(posedge clk) disable iff (!rst_n) arx_flag |-> state == S_WAIT);

  always_comb begin
    arx_load = (state == S_LOAD);
    addr_pa  = '0;
    addr_pb  = '0;
    addr_po  = '0;
    wrena    = 1'b0;
    iosel    = 1'b0;
    ioena    = 2'b00;
    pi_flag  = (state == S_DONE);
    unique case (state)
      S_IN: begin
        ioena[0] = 1'b1;
        wrena    = 1'b1;
        addr_pa  = 6'(PF_STATE_BASE) + 6'(cnt);
      end
      S_FEED: begin
        addr_pa = xbase + 6'(cnt);
        addr_pb = ybase + 6'(cnt);
      end
      S_WAIT: begin
        iosel   = 1'b1;
        wrena   = arx_flag;
        addr_pa = wbase + 6'(cnt);
      end
      S_OUT: begin
        ioena[1] = 1'b1;
        addr_po  = cnt;
      end
      default: ;
    endcase
  end

endmodule
