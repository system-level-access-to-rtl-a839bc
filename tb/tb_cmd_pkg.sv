// tb_cmd_pkg: host-side helpers shared by the testbenches: build command
// byte sequences and the reference instrument lengths.
package tb_cmd_pkg;
  typedef byte unsigned bq_t[$];

  // control command: b7 = 0, b6 = write, 14-bit instrument number
  function automatic void add_ctrl(ref bq_t q, input int idx, input bit wr);
    q.push_back(byte'({1'b0, wr, 6'(idx >> 8)}));
    q.push_back(byte'(idx & 32'hff));
  endfunction

  // data command: b7 = 1, 15-bit payload byte count
  function automatic void add_data(ref bq_t q, input int count);
    q.push_back(byte'({1'b1, 7'(count >> 8)}));
    q.push_back(byte'(count & 32'hff));
  endfunction

  // benchmark instrument length: 8, 16, 32, 8, ...
  function automatic int blen(int idx);
    return 8 << ((idx - 1) % 3);
  endfunction

  // bit offset of instrument idx in the flat instrument vector
  function automatic int boff(int idx);
    return 56 * ((idx - 1) / 3) + (((idx - 1) % 3) == 0 ? 0 : ((idx - 1) % 3) == 1 ? 8 : 24);
  endfunction

  // wrap a command sequence for the level-i+1 IC: select iA for writing and
  // send the sequence as the payload of one data command
  function automatic bq_t wrap(bq_t inner);
    bq_t q;
    add_ctrl(q, 1, 1'b1);
    add_data(q, inner.size());
    foreach (inner[i]) q.push_back(inner[i]);
    return q;
  endfunction
endpackage
