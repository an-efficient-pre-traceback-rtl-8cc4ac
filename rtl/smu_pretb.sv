// smu_pretb: pre-traceback survivor-path memory unit (SMU).
//
// Turns the ACS decision vectors into decoded bits using only two kinds of
// survivor memory access: the column write (WR) and the decode read (DC).
// The traceback read of a conventional SMU, which only serves to find the
// decode start state, is replaced by the pointer register array, which
// tracks that start state forward while the columns are written.
//
// Schedule, in blocks of L steps (block k is written into bank k mod 3):
//   - while block k is written, the pointer registers follow it, restarting
//     from the identity on its first column;
//   - on the first column of block k+1, pointer register 0 holds the state at
//     the end of block k-1; it is copied into the DC start register and the
//     decode of block k-1 (bank (k-1) mod 3, the bank after the write bank)
//     begins, reading backwards one column per step;
//   - the decoded bits, newest first, fill one stack of the LIFO, and leave
//     from it in order during the next block.
// So at any time one bank is written, one is decoded and one waits for its
// pointer result; the memory is 3L columns deep.
//
// Interface: one step per cycle with dec_valid high; every part of the unit
// holds while dec_valid is low. The decoded bit of the column entered at
// enabled step n leaves, in order, with out_valid at enabled step n + 3L + 1:
// the LIFO's reversal makes the delay the same for every bit. 3L of it is the
// block schedule (write, wait for the pointer result, decode and reverse),
// the extra step is the registered memory read. The first bits leave after
// three blocks have been written.
//
// The decode takes pointer register 0; the other registers only feed the
// pointer array itself, and the controller's last-column flag is not needed
// here, so lint reports those bits as unused.
module smu_pretb #(
  parameter int unsigned K   = 7,
  parameter int unsigned L   = 64,
  localparam int unsigned N  = 1 << (K - 1),
  localparam int unsigned SW = K - 1,
  localparam int unsigned AW = $clog2(3 * L)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         dec_valid,
  input  logic [N-1:0] dec,
  output logic         out_valid,
  output logic         out_bit
);

  logic [AW-1:0]        waddr, raddr;
  logic                 restart, blk_end, re;
  logic [1:0]           wbank, blocks_done, dc_bank;
  logic [N-1:0][SW-1:0] ptr;
  logic [N-1:0]         rdata;
  logic                 dc_start;
  logic                 bit_valid, bit_out, blk_last;

  smu_ctrl #(.L(L)) u_ctrl (
    .clk, .rst_n, .en(dec_valid),
    .waddr, .restart, .blk_end, .wbank, .blocks_done
  );

  survivor_mem #(.K(K), .L(L)) u_mem (
    .clk, .we(dec_valid), .waddr, .wdata(dec),
    .re, .raddr, .rdata
  );

  ptb_pointer_reg #(.K(K)) u_ptr (
    .clk, .en(dec_valid), .restart, .dec, .ptr
  );

  // A decode starts at the first column of a block once two whole blocks
  // exist: the one whose pointer result is ready and the one to decode.
  assign dc_start = restart && (blocks_done == 2'd2);
  assign dc_bank  = (wbank == 2'd2) ? 2'd0 : wbank + 2'd1;

  dc_unit #(.K(K), .L(L)) u_dc (
    .clk, .rst_n, .en(dec_valid),
    .start(dc_start), .start_state(ptr[0]), .start_bank(dc_bank),
    .re, .raddr, .rdata,
    .bit_valid, .bit_out, .blk_last
  );

  lifo #(.L(L)) u_lifo (
    .clk, .rst_n, .en(dec_valid),
    .push(bit_valid), .din(bit_out), .swap(bit_valid && blk_last),
    .out_valid, .dout(out_bit)
  );

endmodule
