// minbd_tb_pkg: helpers shared by the testbenches: building flits, random flits and the
// productive-port rule written out independently of the RTL package function.
package minbd_tb_pkg;
  import minbd_pkg::*;

  function automatic flit_t mk_flit(input int dx, input int dy, input int src, input int txn,
                                    input int seq, input int last, input int data);
    flit_t f;
    f          = '0;
    f.valid    = 1'b1;
    f.dst_x    = COORD_W'(dx);
    f.dst_y    = COORD_W'(dy);
    f.src      = NODE_W'(src);
    f.txn      = TXN_W'(txn);
    f.seq      = SEQ_W'(seq);
    f.last_seq = SEQ_W'(last);
    f.data     = DATA_W'(data);
    return f;
  endfunction

  // Random flit inside a 4x4 mesh, present with probability pct/100.
  function automatic flit_t rand_flit(input int pct, input int tagval);
    if (int'($urandom_range(99)) >= pct) return '0;
    return mk_flit($urandom_range(3), $urandom_range(3), $urandom_range(15), $urandom_range(15),
                   $urandom_range(7), 7, tagval);
  endfunction

  // Is leaving router (x,y) through port p a step towards the flit's destination?
  function automatic bit ref_productive(input flit_t f, input int x, input int y, input int p);
    if (!f.valid) return 0;
    case (p)
      0: return int'(f.dst_y) > y;   // North
      1: return int'(f.dst_x) > x;   // East
      2: return int'(f.dst_y) < y;   // South
      default: return int'(f.dst_x) < x;  // West
    endcase
  endfunction

  function automatic bit ref_has_productive(input flit_t f, input int x, input int y);
    return ref_productive(f, x, y, 0) || ref_productive(f, x, y, 1) ||
           ref_productive(f, x, y, 2) || ref_productive(f, x, y, 3);
  endfunction
endpackage
