// kpig: key, public message number and internal state generator (KPIG).
//
// Two 32-byte buffers: the first holds the key and the PMN, the second the internal state
// IS (cleared to zero, later the common internal state CIS computed by the pi-function).
// The generator's output stream, kpmn_db, is (Key || PMN || 10*) xor IS, sixteen words, word
// 0 first; the padding word right after the PMN is 16'h8000 and the rest is zero.
//
// The 3-bit key_gen selects one of eight modes; a mode runs once each time key_gen takes a
// new value:
//   000 clear both buffers            001 store key, output
//   010 store key and IS, output      011 store key, PMN and IS, output
//   100 store PMN, output             101 store PMN, key and IS, output
//   110 store PMN and key, output     111 store IS from the pi-function output
// Stored words arrive in the order key, PMN, IS. Key and PMN words, and the IS words of the
// modes 010/011/101, come through key_pmn qualified by key_pmn_valid; in mode 111 the sixteen
// IS words come from is_in qualified by is_valid. Once the stores are done an output mode
// raises kpmn_flag and serves one word per rd strobe (kpmn_db shows the current word);
// after the sixteenth the flag drops. The mode table follows the architecture; the order of
// the words, the IS source in the user modes and the strobes are this design's choices.
module kpig
  import pi16_pkg::*;
#(
  parameter int unsigned KEY_WORDS = 6,   // 96-bit key
  parameter int unsigned PMN_WORDS = 2    // 32-bit public message number
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] key_gen,
  input  word_t      key_pmn,
  input  logic       key_pmn_valid,
  input  word_t      is_in,
  input  logic       is_valid,
  input  logic       rd,
  output word_t      kpmn_db,
  output logic       kpmn_flag
);

  localparam int unsigned KP_WORDS = KEY_WORDS + PMN_WORDS;

  typedef enum logic [2:0] {S_IDLE, S_KEY, S_PMN, S_ISU, S_ISP, S_OUT} state_t;

  state_t     state;
  logic [2:0] mode;      // mode being run / last run
  logic [3:0] cnt;
  word_t      kp   [16];
  word_t      is_q [16];

  // which steps a mode contains
  function automatic logic st_key(logic [2:0] m);
    return m inside {3'b001, 3'b010, 3'b011, 3'b101, 3'b110};
  endfunction
  function automatic logic st_pmn(logic [2:0] m);
    return m inside {3'b011, 3'b100, 3'b101, 3'b110};
  endfunction
  function automatic logic st_isu(logic [2:0] m);
    return m inside {3'b010, 3'b011, 3'b101};
  endfunction
  function automatic logic gen_out(logic [2:0] m);
    return m != 3'b000 && m != 3'b111;
  endfunction

  // first step of mode m at or after step s
  function automatic state_t next_step(logic [2:0] m, state_t s);
    if (s <= S_KEY && st_key(m))  return S_KEY;
    if (s <= S_PMN && st_pmn(m))  return S_PMN;
    if (s <= S_ISU && st_isu(m))  return S_ISU;
    if (s <= S_ISP && m == 3'b111) return S_ISP;
    if (s <= S_OUT && gen_out(m)) return S_OUT;
    return S_IDLE;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      mode  <= 3'b000;
      cnt   <= '0;
      for (int i = 0; i < 16; i++) begin
        kp[i]   <= '0;
        is_q[i] <= '0;
      end
    end else begin
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (key_gen != mode) begin
            mode <= key_gen;
            if (key_gen == 3'b000) begin
              for (int i = 0; i < 16; i++) begin
                kp[i]   <= '0;
                is_q[i] <= '0;
              end
            end
            state <= next_step(key_gen, S_KEY);
          end
        end
        S_KEY: if (key_pmn_valid) begin
          kp[cnt] <= key_pmn;
          cnt     <= cnt + 4'd1;
          if (cnt == 4'(KEY_WORDS - 1)) begin
            cnt   <= '0;
            state <= next_step(mode, S_PMN);
          end
        end
        S_PMN: if (key_pmn_valid) begin
          kp[4'(KEY_WORDS) + cnt] <= key_pmn;
          cnt <= cnt + 4'd1;
          if (cnt == 4'(PMN_WORDS - 1)) begin
            cnt   <= '0;
            state <= next_step(mode, S_ISU);
          end
        end
        S_ISU: if (key_pmn_valid) begin
          is_q[cnt] <= key_pmn;
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) state <= next_step(mode, S_ISP);
        end
        S_ISP: if (is_valid) begin
          is_q[cnt] <= is_in;
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) state <= next_step(mode, S_OUT);
        end
        S_OUT: if (rd) begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // (Key || PMN || 10*) xor IS, word cnt
  word_t kp_word;
  always_comb begin
    if (32'(cnt) < KP_WORDS)       kp_word = kp[cnt];
    else if (32'(cnt) == KP_WORDS) kp_word = 16'h8000;
    else                           kp_word = '0;
  end

  // words may only be taken while the output is offered
  a_rd_when_ready: assert property (@(posedge clk) disable iff (!rst_n) rd |-> state == S_OUT);

  assign kpmn_db   = kp_word ^ is_q[cnt];
  assign kpmn_flag = (state == S_OUT);

endmodule
