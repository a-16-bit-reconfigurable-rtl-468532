// mpcu: message processor control unit (a Moore state machine with two strobe-qualified
// write enables).
//
// It encrypts one 128-bit message block per Start:
//   INIT     KPIG key_gen 000 (clears its buffers), ALU_mode 00; waits for Start
//   LOAD     key_gen from PC, ALU_mode 00: the KPIG stores key/PMN (and IS if chosen) and
//            the ALU stores the counter and the message; waits for Kpmn_flag and ALU_flag
//   PF_INIT  DBSEL = KPIG, PF_start: pi((Key||PMN||10*) xor IS) = CIS. key_gen 111 makes the
//            KPIG keep a copy of CIS in its IS buffer; the ALU keeps it in its result buffer
//   PF_CTR   ALU_mode 10, DBSEL = ALU, PF_start: pi(CIS xor counter)
//   PF_MSG   ALU_mode 11, DBSEL = ALU, PF_start: the ALU feeds message xor result; its first
//            eight words are the ciphertext and go to the cipher buffer as the pi-function
//            takes them; the first eight output words of this call are the tag
//   OUT      Tag_flag high for eight cycles while the cipher and tag buffers are read out
//            (address k in the k-th cycle)
// PC 0000 is the automatic mode, key_gen 110 (store key and PMN); any other PC gives
// key_gen = PC[2:0], except that 000 and 111, which would produce no KPIG output, also
// fall back to 110. PC[3] is not used. Each PF state pulses PF_start in its first cycle
// and leaves on PF_flag. The state split, the PC mapping and the source of the ciphertext
// are this design's reading of the architecture.
module mpcu
  import pi16_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [3:0] pc,
  input  logic       kpmn_flag,
  input  logic       alu_flag,
  input  logic       pf_flag,
  input  logic       pf_take,      // pi-function takes an input word
  input  logic       pf_valid,     // pi-function output word valid
  output logic [2:0] key_gen,
  output logic       dbsel,
  output logic [1:0] alu_mode,
  output logic       pf_start,
  output logic       cipher_enable,
  output logic [3:0] cipher_addr,
  output logic       tag_enable,
  output logic [3:0] tag_addr,
  output logic       tag_flag,
  output logic       busy
);

  typedef enum logic [2:0] {S_INIT, S_LOAD, S_PF_INIT, S_PF_CTR, S_PF_MSG, S_OUT} state_t;

  state_t     state;
  logic       first;     // first cycle of a PF state
  logic [2:0] kg_sel;
  logic [3:0] icnt, ocnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_INIT;
      first  <= 1'b0;
      kg_sel <= 3'b110;
      icnt   <= '0;
      ocnt   <= '0;
    end else begin
      first <= 1'b0;
      unique case (state)
        S_INIT: begin
          icnt <= '0;
          ocnt <= '0;
          if (start) begin
            kg_sel <= (pc[2:0] == 3'b000 || pc[2:0] == 3'b111) ? 3'b110 : pc[2:0];
            state  <= S_LOAD;
          end
        end
        S_LOAD: if (kpmn_flag && alu_flag) begin
          state <= S_PF_INIT;
          first <= 1'b1;
        end
        S_PF_INIT: if (pf_flag) begin
          state <= S_PF_CTR;
          first <= 1'b1;
        end
        S_PF_CTR: if (pf_flag) begin
          state <= S_PF_MSG;
          first <= 1'b1;
          icnt  <= '0;
          ocnt  <= '0;
        end
        S_PF_MSG: begin
          if (pf_take && icnt != 4'd15) icnt <= icnt + 4'd1;
          if (pf_valid && ocnt != 4'd15) ocnt <= ocnt + 4'd1;
          if (pf_flag) begin
            state <= S_OUT;
            ocnt  <= '0;
          end
        end
        S_OUT: begin
          ocnt <= ocnt + 4'd1;
          if (ocnt == 4'd7) state <= S_INIT;
        end
        default: state <= S_INIT;
      endcase
    end
  end

  // the pi-function only finishes a call the unit has started
  a_pf_flag_in_call: assert property (@(posedge clk) disable iff (!rst_n)
    pf_flag |-> state inside {S_PF_INIT, S_PF_CTR, S_PF_MSG});

  always_comb begin
    key_gen       = 3'b000;
    dbsel         = 1'b0;
    alu_mode      = 2'b00;
    pf_start      = 1'b0;
    cipher_enable = 1'b0;
    cipher_addr   = '0;
    tag_enable    = 1'b0;
    tag_addr      = '0;
    tag_flag      = 1'b0;
    busy          = (state != S_INIT);
    unique case (state)
      S_LOAD:    key_gen = kg_sel;
      S_PF_INIT: begin key_gen = 3'b111; pf_start = first; end
      S_PF_CTR:  begin key_gen = 3'b111; dbsel = 1'b1; alu_mode = 2'b10; pf_start = first; end
      S_PF_MSG: begin
        key_gen       = 3'b111;
        dbsel         = 1'b1;
        alu_mode      = 2'b11;
        pf_start      = first;
        cipher_enable = pf_take && icnt < 4'd8;
        cipher_addr   = icnt;
        tag_enable    = pf_valid && ocnt < 4'd8;
        tag_addr      = ocnt;
      end
      S_OUT: begin
        key_gen     = 3'b111;
        tag_flag    = 1'b1;
        cipher_addr = ocnt;
        tag_addr    = ocnt;
      end
      default: ;
    endcase
  end

endmodule
