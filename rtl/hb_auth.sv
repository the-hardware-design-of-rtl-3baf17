// hb_auth: unified tag-side authentication unit for HB, HB+, HB-MP and HB-MP+.
//
// One start computes one protocol round i for the challenge a_i = ran_num_in.
// The units are shared between the four protocols and a small controller
// steps through them:
//   random bit unit  -> noise bit v_i
//   random num unit  -> random vector b_i (HB+, HB-MP, HB-MP+)
//   key gen unit     -> round key x_i = f(a_i, x) (HB-MP, HB-MP+)
//   dot product unit -> x.a_i, then y.b_i (HB+) or b_i.x_i (HB-MP/HB-MP+)
//   comparator       -> adjusts b_i until b_i.x_i = z_i (HB-MP/HB-MP+)
// The dot product unit is shared in time: the `sel_key` and `state`
// multiplexers choose its key and vector operands in each step, and a
// protocol-controlled multiplexer feeds 0 instead of y.b_i into the z
// XOR for the protocols that have no such term.
//
// Responses (x = key1, y = key2):
//   HB     : z = x.a ^ v;            auth_out = {63'b0, z}
//   HB+    : z = x.a ^ y.b ^ v;      auth_out = b
//   HB-MP  : z = x.a ^ v;            auth_out = b with b.x_i = z, x_i = rotl(x, a[5:0])
//   HB-MP+ : z = x.a ^ v;            auth_out = b with b.x_i = z, x_i = rotl(x ^ a, a[5:0])
// The unit list, the operand multiplexers and the HB / HB+ equations follow
// the published architecture.  For HB-MP and HB-MP+ the published round
// computes z from y.b_i before b_i is generated; this design drops that term
// (see README) and uses its own f (auth_keygen_unit).
//
// Timing: start is accepted when busy is low; done pulses with the result
// 3 (HB), 4 (HB+) or 5 (HB-MP, HB-MP+) cycles after the accepting clock
// edge, and auth_out/z_out hold until the next start.  Synchronous active-low reset.
module hb_auth
  import crypto_pkg::*;
#(
  parameter logic [31:0] BIT_SEED = 32'hACE1_2468,
  parameter logic [63:0] NUM_SEED = 64'h0123_4567_89AB_CDEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  auth_alg_e   protocol,
  input  logic [63:0] key1,        // x
  input  logic [63:0] key2,        // y
  input  logic [63:0] ran_num_in,  // challenge a_i from the reader
  output logic [63:0] auth_out,
  output logic        z_out,
  output logic        b_adjusted,  // comparator changed b (HB-MP/HB-MP+)
  output logic        fail,        // b.x_i = z impossible (x_i = 0)
  output logic        busy,
  output logic        done
);

  typedef enum logic [2:0] {
    S_IDLE, S_RAND, S_DOT_XA, S_DOT_YB, S_DOT_BX, S_CMP, S_DONE
  } state_e;

  state_e      state;
  auth_alg_e   alg_q;
  logic [63:0] x_q, y_q, a_q;
  logic        d_xa;                 // x . a
  logic        accept;
  logic        is_mp;

  // unit handshakes
  logic        rbu_valid_in, rbu_valid_out, ran_bit;
  logic        rnu_valid_in, rnu_valid_out;
  logic [63:0] ran_num;
  logic        key_valid_in, key_valid_out;
  logic [63:0] round_key;
  logic        dot_valid_in, dot_valid_out, dot;
  logic [63:0] dot_key, dot_vec;
  logic        com_valid_in, com_valid_out;
  logic [63:0] com_b;
  logic        com_adjusted, com_fail;
  logic        v_q, z_q;

  assign accept = start && (state == S_IDLE);
  assign is_mp  = (alg_q == AUTH_HBMP) || (alg_q == AUTH_HBMPP);
  assign busy   = (state != S_IDLE);

  rand_bit_unit #(.SEED(BIT_SEED)) u_rbu (
    .clk(clk), .rst_n(rst_n), .rbu_valid_in(rbu_valid_in),
    .ran_bit(ran_bit), .rbu_valid_out(rbu_valid_out)
  );

  rand_num_unit #(.SEED(NUM_SEED)) u_rnu (
    .clk(clk), .rst_n(rst_n), .rnu_valid_in(rnu_valid_in),
    .ran_num(ran_num), .rnu_valid_out(rnu_valid_out)
  );

  auth_keygen_unit u_keygen (
    .clk(clk), .rst_n(rst_n), .key_valid_in(key_valid_in),
    .plus(protocol == AUTH_HBMPP), .key_in(key1), .challenge(ran_num_in),
    .key_out(round_key), .key_valid_out(key_valid_out)
  );

  dot_product_unit u_dot (
    .clk(clk), .rst_n(rst_n), .dot_valid_in(dot_valid_in),
    .key(dot_key), .random(dot_vec),
    .dot(dot), .dot_valid_out(dot_valid_out)
  );

  auth_comparator u_cmp (
    .clk(clk), .rst_n(rst_n), .com_valid_in(com_valid_in),
    .z(z_q), .parity(dot), .b_in(ran_num), .round_key(round_key),
    .b_out(com_b), .adjusted(com_adjusted), .fail(com_fail),
    .com_valid_out(com_valid_out)
  );

  // Requests to the units
  assign rbu_valid_in = accept;
  assign rnu_valid_in = accept && (protocol != AUTH_HB);
  assign key_valid_in = accept && ((protocol == AUTH_HBMP) || (protocol == AUTH_HBMPP));

  // Dot product operand multiplexers (sel_key / state)
  always_comb begin
    dot_valid_in = 1'b0;
    dot_key      = x_q;
    dot_vec      = a_q;
    unique case (state)
      S_RAND: begin
        dot_valid_in = 1'b1;                  // x . a
      end
      S_DOT_XA: begin
        dot_valid_in = dot_valid_out && (alg_q != AUTH_HB);
        if (is_mp) begin
          dot_key = round_key;                // b . x_i
          dot_vec = ran_num;
        end else begin
          dot_key = y_q;                      // y . b
          dot_vec = ran_num;
        end
      end
      default: ;
    endcase
  end

  // Every unit requested at start answers in the cycle after.
  a_units_answer: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RAND) |-> (rbu_valid_out
                           && (rnu_valid_out || (alg_q == AUTH_HB))
                           && (key_valid_out || !is_mp)));

  assign com_valid_in = (state == S_DOT_BX) && dot_valid_out;

  // z_i = x.a ^ (y.b or 0) ^ v
  logic z_next;
  assign z_next = d_xa ^ ((alg_q == AUTH_HBP) ? dot : 1'b0) ^ v_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      alg_q      <= AUTH_HB;
      x_q        <= '0;
      y_q        <= '0;
      a_q        <= '0;
      d_xa       <= 1'b0;
      v_q        <= 1'b0;
      z_q        <= 1'b0;
      auth_out   <= '0;
      z_out      <= 1'b0;
      b_adjusted <= 1'b0;
      fail       <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (accept) begin
          alg_q <= protocol;
          x_q   <= key1;
          y_q   <= key2;
          a_q   <= ran_num_in;
          state <= S_RAND;
        end
        S_RAND: begin
          // random bit / number / round key arrive this cycle
          if (rbu_valid_out) v_q <= ran_bit;
          state <= S_DOT_XA;
        end
        S_DOT_XA: if (dot_valid_out) begin
          d_xa <= dot;
          if (alg_q == AUTH_HB) begin
            z_q   <= dot ^ v_q;
            state <= S_DONE;
          end else if (is_mp) begin
            z_q   <= dot ^ v_q;
            state <= S_DOT_BX;
          end else begin
            state <= S_DOT_YB;
          end
        end
        S_DOT_YB: if (dot_valid_out) begin
          z_q   <= z_next;
          state <= S_DONE;
        end
        S_DOT_BX: if (dot_valid_out) state <= S_CMP;
        S_CMP: if (com_valid_out) state <= S_DONE;
        S_DONE: begin
          state      <= S_IDLE;
          done       <= 1'b1;
          z_out      <= z_q;
          b_adjusted <= is_mp && com_adjusted;
          fail       <= is_mp && com_fail;
          unique case (alg_q)
            AUTH_HB:  auth_out <= {63'b0, z_q};
            AUTH_HBP: auth_out <= ran_num;
            default:  auth_out <= com_b;
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
