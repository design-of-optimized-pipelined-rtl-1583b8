// ripemd160_iterative - iterative RIPEMD-160 compression core.
//
// One step unit per line is reused for all 80 steps. A block is loaded when
// load and ready are both high at a clock edge: the 16 message words go into
// the message memory, both lines start from the chaining value h_in, and the
// step counter t is cleared. For t = 0..79 the counter addresses the
// schedule (message selection, rotations, constants, function numbers) and
// one step of each line is taken per clock. After step 79 the final
// addition is registered and out_valid pulses for one cycle with h_out (the
// new chaining value) and digest (its byte string).
//
// Timing: if load is accepted at clock edge N, out_valid is high after edge
// N+81, i.e. 82 clock cycles per block counting the load cycle. ready stays
// low from the load until the result appears, so blocks follow every 82
// cycles at best. The cycle count and the registered output follow the
// described design; the one-cycle 512-bit load, the byte order of the block
// (byte 0 in [511:504], words read little-endian) and the reset behaviour
// are this design's choices.
module ripemd160_iterative
  import ripemd160_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  output logic         ready,
  input  logic [511:0] block,
  input  hash_t        h_in,
  output logic         out_valid,
  output hash_t        h_out,
  output logic [159:0] digest
);

  logic       busy, fin;
  logic [6:0] t;
  state_t     st, nxt;
  hash_t      hreg;
  logic       start;

  logic [3:0] m_l, m_r, s_l, s_r;
  word_t      k_l, k_r;
  logic [2:0] f_l, f_r;
  logic [1:0][3:0]  raddr;
  logic [1:0][31:0] rdata;

  assign ready = !busy && !fin;
  assign start = load && ready;

  ripemd160_sched u_sched (
    .t(t), .m_l(m_l), .m_r(m_r), .s_l(s_l), .s_r(s_r),
    .k_l(k_l), .k_r(k_r), .f_l(f_l), .f_r(f_r)
  );

  assign raddr = {m_r, m_l};

  ripemd160_msg_mem #(.WORDS(16), .NRD(2)) u_mem (
    .clk(clk), .load(start), .wdata(bytes_to_words(block)),
    .raddr(raddr), .rdata(rdata), .words()
  );

  ripemd160_step u_left (
    .st(st.l), .x(rdata[0]), .k(k_l), .s(s_l), .fsel(f_l), .nxt(nxt.l)
  );
  ripemd160_step u_right (
    .st(st.r), .x(rdata[1]), .k(k_r), .s(s_r), .fsel(f_r), .nxt(nxt.r)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      fin  <= 1'b0;
    end else begin
      fin <= 1'b0;
      if (start) begin
        busy <= 1'b1;
      end else if (busy && t == 7'(NUM_STEPS - 1)) begin
        busy <= 1'b0;
        fin  <= 1'b1;
      end
    end
    if (start) begin
      st   <= '{l: '{h_in[0], h_in[1], h_in[2], h_in[3], h_in[4]},
                r: '{h_in[0], h_in[1], h_in[2], h_in[3], h_in[4]}};
      hreg <= h_in;
      t    <= '0;
    end else if (busy) begin
      st <= nxt;
      t  <= t + 7'd1;
    end
  end

  ripemd160_final_add u_final (
    .clk(clk), .rst_n(rst_n), .in_valid(fin), .h_in(hreg), .st(st),
    .out_valid(out_valid), .h_out(h_out), .digest(digest)
  );

`ifndef SYNTHESIS
  // A load is only taken while idle; ready must drop right after it.
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n)
    start |=> !ready);
`endif

endmodule
