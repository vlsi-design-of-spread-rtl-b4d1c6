// walsh_transform: 64-point fast Walsh transform of one 8x8 block on a single
// RAM (the Walsh transform module; with SHIFT = 0 it is the inverse module).
//
// How it works. The block arrives as 64 consecutive words on din (row-major
// pixel order). A binary counter addresses them and the bit-reversal unit
// turns each count into the address at which the sample is written, so the
// RAM ends up holding the block in bit-reversed order. Then the WT1 address
// generator walks the 6 stages x 32 butterflies of the fast algorithm. Each
// butterfly takes 3 cycles on the RAM's one read and one write port:
//   phase 0: read F(I) into data register 1
//   phase 1: read F(IP); write F(I) <- reg1 + F(IP); data register 2 <- reg1 - F(IP)
//   phase 2: write F(IP) <- reg2
// Finally the counter reads the RAM in natural order through a right shifter
// (arithmetic shift by SHIFT, i.e. division by 64 with rounding toward minus
// infinity for the forward transform). The result is
//   X[k] = (sum_n x[n] * (-1)^popcount(bitrev(k) & n)) >>> SHIFT,
// which, because the 8x8 Walsh-Hadamard kernel is the Kronecker product of two
// 8-point kernels, is the 2-D block Walsh transform. The kernel times itself
// is 64 times the identity, so the unshifted unit (SHIFT = 0) inverts the
// shifted one and W6(W0(X)) = X holds exactly for any 64 coefficients X.
//
// Interface and timing. ready_o is high in the idle state; the cycle in which
// in_valid is seen while idle carries sample 0, and in_valid must then stay
// high for the following 63 cycles (checked by an assertion). Sample 0 in
// cycle 1 gives coefficients on dout with out_valid in cycles 641..704 (64
// load + 576 butterfly + 64 read-out cycles), out_index naming the
// coefficient and out_last marking the last one. ready_o is high again in
// cycle 705. Arithmetic is 16-bit two's complement and wraps, as in the
// source's 16-bit datapath. The source drives the multiplexer selects from
// outside; here a small state machine generates them, and the 3-cycle
// butterfly schedule is this design's reading of the source's dual-clocked
// RAM accesses (it reproduces the source's 1344 cycles per embedded block).
module walsh_transform
  import ssw_pkg::*;
#(
  parameter int unsigned SHIFT = 6,
  parameter int unsigned DEPTH = 96
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t din,
  output logic  ready_o,
  output logic  out_valid,
  output word_t dout,
  output idx_t  out_index,
  output logic  out_last
);

  localparam int unsigned AW = $clog2(DEPTH);

  wt_state_e      state;
  logic [1:0]     ph;             // butterfly phase
  logic [7:0]     count;
  idx_t           rev;
  logic           cnt_clear, cnt_en, cnt_end;
  idx_t           bf_i, bf_ip;
  logic           bf_last, bf_restart, bf_advance;
  word_t          reg1, reg2;     // data registers 1 and 2
  logic           we;
  logic [AW-1:0]  waddr, raddr;
  word_t          wdata, rdata;

  bitrev_counter #(.W(8), .LOGN(LOGN)) u_counter (
    .clk, .rst_n, .clear(cnt_clear), .en(cnt_en), .count_o(count), .rev_o(rev)
  );

  wt1_index_gen u_wt1 (
    .clk, .rst_n, .restart(bf_restart), .advance(bf_advance),
    .i_o(bf_i), .ip_o(bf_ip), .last_o(bf_last)
  );

  wt2_ram #(.DW(DW), .DEPTH(DEPTH)) u_wt2 (
    .clk, .we, .waddr, .wdata(wdata), .raddr, .rdata(rdata)
  );

  assign cnt_end = (count == 8'(N - 1));

  // control: counter, WT1 and RAM port selects (MUX-1..MUX-6 of the source)
  always_comb begin
    cnt_en     = 1'b0;
    cnt_clear  = 1'b0;
    bf_restart = 1'b0;
    bf_advance = 1'b0;
    we         = 1'b0;
    waddr      = AW'(rev);
    wdata      = din;
    raddr      = AW'(count[LOGN-1:0]);
    unique case (state)
      WT_IDLE: begin
        we     = in_valid;
        cnt_en = in_valid;
      end
      WT_LOAD: begin
        we         = 1'b1;
        cnt_en     = 1'b1;
        cnt_clear  = cnt_end;
        bf_restart = cnt_end;
      end
      WT_BFLY: begin
        unique case (ph)
          2'd0: raddr = AW'(bf_i);
          2'd1: begin
            raddr = AW'(bf_ip);
            we    = 1'b1;
            waddr = AW'(bf_i);
            wdata = reg1 + word_t'(rdata);   // adder: F(I) + F(IP)
          end
          default: begin
            we         = 1'b1;
            waddr      = AW'(bf_ip);
            wdata      = reg2;               // subtractor result
            bf_advance = 1'b1;
          end
        endcase
      end
      WT_OUT: begin
        cnt_en    = 1'b1;
        cnt_clear = cnt_end;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= WT_IDLE;
      ph    <= '0;
      reg1  <= '0;
      reg2  <= '0;
    end else begin
      unique case (state)
        WT_IDLE: if (in_valid) state <= WT_LOAD;
        WT_LOAD: if (cnt_end) begin
          state <= WT_BFLY;
          ph    <= '0;
        end
        WT_BFLY: begin
          unique case (ph)
            2'd0: begin
              reg1 <= rdata;
              ph   <= 2'd1;
            end
            2'd1: begin
              reg2 <= reg1 - word_t'(rdata);
              ph   <= 2'd2;
            end
            default: begin
              ph <= 2'd0;
              if (bf_last) state <= WT_OUT;
            end
          endcase
        end
        WT_OUT: if (cnt_end) state <= WT_IDLE;
        default: state <= WT_IDLE;
      endcase
    end
  end

  // right shifter and output
  assign ready_o   = (state == WT_IDLE);
  assign out_valid = (state == WT_OUT);
  assign out_index = count[LOGN-1:0];
  assign out_last  = out_valid && cnt_end;
  assign dout      = word_t'(rdata) >>> SHIFT;

  // a block must arrive as 64 back-to-back samples
  a_load_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    (state == WT_LOAD) |-> in_valid)
    else $error("walsh_transform: in_valid dropped during a block load");

endmodule
